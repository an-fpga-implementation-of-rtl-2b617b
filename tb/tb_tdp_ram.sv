// tb_tdp_ram: self-checking test of the two-port RAM with lane enables.
// A shadow array in the testbench follows every write; both ports read back
// random addresses and must show the shadow word one clock later. Lane
// writes from port A and full writes from port B are mixed at random.
module tb_tdp_ram;
  localparam int DEPTH = 128, WIDTH = 32, LANES = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [LANES-1:0] a_we, b_we;
  logic [6:0] a_addr, b_addr;
  logic [WIDTH-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .LANES(LANES)) dut (.*);

  initial begin
    logic [WIDTH-1:0] exp_a, exp_b;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 4'hf; b_addr = 7'(i); b_wdata = $urandom; shadow[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      a_addr = 7'($urandom_range(DEPTH - 1));
      b_addr = 7'($urandom_range(DEPTH - 1));
      a_we = ($urandom_range(3) == 0) ? 4'($urandom) : 4'h0;
      b_we = ($urandom_range(5) == 0 && b_addr != a_addr) ? 4'hf : 4'h0;
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = shadow[a_addr];
      exp_b = shadow[b_addr];
      for (int l = 0; l < LANES; l++) if (a_we[l]) shadow[a_addr][l*8 +: 8] = a_wdata[l*8 +: 8];
      if (b_we[0]) shadow[b_addr] = b_wdata;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL port A addr %0d", a_addr); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL port B addr %0d", b_addr); end
    end
    // final read-back of everything
    a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_addr = 7'(i); b_addr = 7'(DEPTH - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== shadow[i]) failures++;
      if (b_rdata !== shadow[DEPTH - 1 - i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
