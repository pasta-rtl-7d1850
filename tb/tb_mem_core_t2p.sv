// tb_mem_core_t2p: self-checking test of mem_core_t2p, block RAM and
// UltraRAM flavours side by side. Both ports read and write at random
// (never writing the same address together) against an array model; read
// data is checked one cycle after the read and must hold through writes.
module tb_mem_core_t2p;
  import pasta_pkg::*;
  localparam int unsigned W = 16, D = 24, AW = 5;

  logic clk = 0;
  logic [AW-1:0] addr_a, addr_b;
  logic ce_a, we_a, ce_b, we_b;
  logic [W-1:0] din_a, din_b;
  logic [W-1:0] qa [2];
  logic [W-1:0] qb [2];
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  logic [W-1:0] ea, eb;
  bit va = 0, vb = 0;

  mem_core_t2p #(.WIDTH(W), .DEPTH(D), .CORE(CORE_BRAM)) dut_bram (
    .clk, .addr_a, .ce_a, .we_a, .din_a, .qout_a(qa[0]),
    .addr_b, .ce_b, .we_b, .din_b, .qout_b(qb[0]));
  mem_core_t2p #(.WIDTH(W), .DEPTH(D), .CORE(CORE_URAM)) dut_uram (
    .clk, .addr_a, .ce_a, .we_a, .din_a, .qout_a(qa[1]),
    .addr_b, .ce_b, .we_b, .din_b, .qout_b(qb[1]));

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
    ce_a = 0; we_a = 0; ce_b = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    @(negedge clk);
    for (int i = 0; i < D; i += 2) begin
      ce_a = 1; we_a = 1; addr_a = AW'(i);   din_a = W'($urandom); model[i]   = din_a;
      ce_b = 1; we_b = 1; addr_b = AW'(i+1); din_b = W'($urandom); model[i+1] = din_b;
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      ce_a = $urandom % 4 != 0; we_a = $urandom % 2 == 1;
      ce_b = $urandom % 4 != 0; we_b = $urandom % 2 == 1;
      addr_a = AW'($urandom % D); addr_b = AW'($urandom % D);
      if (ce_a && we_a && ce_b && we_b && addr_a == addr_b) we_b = 0;
      din_a = W'($urandom); din_b = W'($urandom);
      for (int k = 0; k < 2; k++) begin
        if (va) check(qa[k] == ea, "port A read data");
        if (vb) check(qb[k] == eb, "port B read data");
      end
      if (ce_a && !we_a) begin ea = model[addr_a]; va = 1; end
      if (ce_b && !we_b) begin eb = model[addr_b]; vb = 1; end
      @(posedge clk);
      if (ce_a && we_a) model[addr_a] = din_a;
      if (ce_b && we_b) model[addr_b] = din_b;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
