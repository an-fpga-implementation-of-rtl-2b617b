// hda_early_stop: hard-decision-aided (HDA) stopping rule.
//
// At the end of every iteration the hard decisions of the two component
// decoders (NBITS bits each, one per information bit) are compared. Decoding
// of the block stops when the two sets agree (if early stop is enabled) or
// when MAX_ITER iterations have been made.
//
// Timing: start clears the iteration count. check is high for one clock when
// an iteration has finished and hd1/hd2 are complete; in that clock stop
// tells whether this was the last iteration and agree whether the decisions
// matched. iter_done counts the finished iterations of the block.
module hda_early_stop #(
  parameter int NBITS    = 212,
  parameter int MAX_ITER = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             en,
  input  logic             check,
  input  logic [NBITS-1:0] hd1,
  input  logic [NBITS-1:0] hd2,
  output logic             agree,
  output logic             stop,
  output logic [3:0]       iter_done
);

  assign agree = (hd1 == hd2);
  assign stop  = check && ((en && agree) || (int'(iter_done) + 1 >= MAX_ITER));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      iter_done <= '0;
    else if (start)  iter_done <= '0;
    else if (check)  iter_done <= iter_done + 4'd1;
  end

endmodule
