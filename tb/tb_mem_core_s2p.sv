// tb_mem_core_s2p: self-checking test of mem_core_s2p.
// Random writes on port A and reads on port B against an array model. Each
// read result is checked exactly one cycle after the read was issued, and
// held until the next read. Same-cycle read and write of one address must
// return the old word.
module tb_mem_core_s2p;
  localparam int unsigned W = 16, D = 40, AW = 6;

  logic clk = 0;
  logic [AW-1:0] addr_a, addr_b;
  logic ce_a, we_a, ce_b;
  logic [W-1:0] din_a, qout_b;
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  bit have_expect = 0;

  mem_core_s2p #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_a = 0; we_a = 0; ce_b = 0; addr_a = 0; addr_b = 0; din_a = 0;
    @(negedge clk);
    // fill every word first
    for (int i = 0; i < D; i++) begin
      ce_a = 1; we_a = 1; addr_a = AW'(i); din_a = W'($urandom); model[i] = din_a;
      @(negedge clk);
    end
    ce_a = 0;
    for (int n = 0; n < 5000; n++) begin
      ce_a = $urandom % 2 == 1; we_a = $urandom % 4 != 0;
      addr_a = AW'($urandom % D); din_a = W'($urandom);
      ce_b = $urandom % 2 == 1;
      addr_b = (n % 7 == 0) ? addr_a : AW'($urandom % D);
      if (have_expect) check(qout_b == expect_q, "read data, latency 1");
      if (ce_b) begin expect_q = model[addr_b]; have_expect = 1; end
      @(posedge clk);
      if (ce_a && we_a) model[addr_a] = din_a;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
