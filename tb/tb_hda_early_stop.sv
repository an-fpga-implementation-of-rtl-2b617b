// tb_hda_early_stop: the stop decision for agreeing and disagreeing
// decisions, with and without early stop, and the iteration limit of 3.
module tb_hda_early_stop;
  localparam int NB = 212;
  logic clk = 0, rst_n = 0, start = 0, en = 0, check = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] hd1, hd2;
  logic agree, stop;
  logic [3:0] iter_done;
  int checks = 0, failures = 0;

  hda_early_stop #(.NBITS(NB), .MAX_ITER(3)) dut (.*);

  task automatic expect_check(bit exp_stop, bit exp_agree, int exp_iter);
    check = 1;
    #1;
    checks += 3;
    if (stop != exp_stop)   begin failures++; $display("FAIL stop=%0d", stop); end
    if (agree != exp_agree) begin failures++; $display("FAIL agree=%0d", agree); end
    if (int'(iter_done) != exp_iter) begin failures++; $display("FAIL iter=%0d", iter_done); end
    @(negedge clk);
    check = 0;
    @(negedge clk);
  endtask

  initial begin
    hd1 = '0; hd2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NB / 32 + 1; w++) hd1[w*32 +: 32] = $urandom;
    hd2 = hd1;
    // early stop enabled, decisions agree at once
    en = 1; start = 1; @(negedge clk); start = 0;
    expect_check(1, 1, 0);
    // early stop enabled, one bit differs twice, then agrees
    start = 1; @(negedge clk); start = 0;
    hd2[NB-1] = ~hd2[NB-1];
    expect_check(0, 0, 0);
    hd2[0] = ~hd2[0]; hd2[NB-1] = ~hd2[NB-1];
    expect_check(0, 0, 1);
    hd2 = hd1;
    expect_check(1, 1, 2);
    // early stop disabled: only the limit stops
    en = 0; start = 1; @(negedge clk); start = 0;
    expect_check(0, 1, 0);
    expect_check(0, 1, 1);
    expect_check(1, 1, 2);
    checks++;
    if (iter_done != 4'd3) begin failures++; $display("FAIL final count"); end
    // no check, no stop
    checks++;
    if (stop) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
