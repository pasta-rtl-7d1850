// tb_memory_module: self-checking test of memory_module in two
// configurations.
//   A: the default buffer (20 x 40 words, two sections, second dimension
//      cyclic by 2, S2P): expected 2 cores of 2*20*40/2 = 800 words.
//   B: a 4 x 3 x 2 buffer, three sections, block factor 2 / complete /
//      normal, T2P, cascade height 4: expected 2*3*1 = 6 cores of
//      3*(2*1*2) = 12 words.
// The expected core counts and depths are worked out here by hand and used
// to size the testbench's port arrays, so a wrong count fails elaboration.
// Every word of every core is written from one side with a value that
// encodes (core, address) and read back from the other side.
module tb_memory_module;
  import pasta_pkg::*;
  localparam int unsigned W = 32;
  localparam int unsigned NA = 2, DA = 800, AWA = 10;
  localparam int unsigned NB = 6, DB = 12,  AWB = 4;

  logic clk = 0;
  int checks = 0, failures = 0;

  logic [AWA-1:0] pa_addr [NA], ca_addr [NA];
  logic           pa_ce [NA], pa_we [NA], ca_ce [NA], ca_we [NA];
  logic [W-1:0]   pa_din [NA], pa_q [NA], ca_din [NA], ca_q [NA];

  logic [AWB-1:0] pb_addr [NB], cb_addr [NB];
  logic           pb_ce [NB], pb_we [NB], cb_ce [NB], cb_we [NB];
  logic [W-1:0]   pb_din [NB], pb_q [NB], cb_din [NB], cb_q [NB];

  memory_module dut_a (
    .clk, .p_addr(pa_addr), .p_ce(pa_ce), .p_we(pa_we), .p_din(pa_din), .p_qout(pa_q),
    .c_addr(ca_addr), .c_ce(ca_ce), .c_we(ca_we), .c_din(ca_din), .c_qout(ca_q));

  memory_module #(
    .WIDTH(W), .DIMS('{4, 3, 2}), .SCHEMES('{PART_BLOCK, PART_COMPLETE, PART_NORMAL}),
    .FACTORS('{2, 1, 1}), .SECTIONS(3), .CORE(CORE_BRAM), .PORTS(PORTS_T2P),
    .CASCADE_HEIGHT(4)
  ) dut_b (
    .clk, .p_addr(pb_addr), .p_ce(pb_ce), .p_we(pb_we), .p_din(pb_din), .p_qout(pb_q),
    .c_addr(cb_addr), .c_ce(cb_ce), .c_we(cb_we), .c_din(cb_din), .c_qout(cb_q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] pat(input int cfg, input int core, input int a, input int side);
    return W'((cfg << 28) ^ (side << 24) ^ (core << 16) ^ (a * 40503));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NA; k++) begin
      pa_ce[k] = 0; pa_we[k] = 0; ca_ce[k] = 0; ca_we[k] = 0; ca_din[k] = 0;
      pa_addr[k] = 0; ca_addr[k] = 0; pa_din[k] = 0;
    end
    for (int k = 0; k < NB; k++) begin
      pb_ce[k] = 0; pb_we[k] = 0; cb_ce[k] = 0; cb_we[k] = 0; cb_din[k] = 0;
      pb_addr[k] = 0; cb_addr[k] = 0; pb_din[k] = 0;
    end
    @(negedge clk);
    // A: producer writes every word of both cores, consumer reads them back
    for (int a = 0; a < DA; a++) begin
      for (int k = 0; k < NA; k++) begin
        pa_ce[k] = 1; pa_we[k] = 1; pa_addr[k] = AWA'(a); pa_din[k] = pat(0, k, a, 0);
      end
      @(negedge clk);
    end
    for (int k = 0; k < NA; k++) begin pa_ce[k] = 0; pa_we[k] = 0; end
    for (int a = 0; a <= DA; a++) begin
      if (a > 0)
        for (int k = 0; k < NA; k++) check(ca_q[k] == pat(0, k, a - 1, 0), "A: consumer reads producer data");
      for (int k = 0; k < NA; k++) begin ca_ce[k] = (a < DA); ca_addr[k] = AWA'(a % DA); end
      @(negedge clk);
    end
    for (int k = 0; k < NA; k++) begin
      ca_ce[k] = 0;
      check(pa_q[k] == '0, "A: S2P producer side reads zero");
    end
    // B: producer writes all, consumer reads; then consumer writes, producer reads
    for (int a = 0; a < DB; a++) begin
      for (int k = 0; k < NB; k++) begin
        pb_ce[k] = 1; pb_we[k] = 1; pb_addr[k] = AWB'(a); pb_din[k] = pat(1, k, a, 0);
      end
      @(negedge clk);
    end
    for (int k = 0; k < NB; k++) begin pb_ce[k] = 0; pb_we[k] = 0; end
    for (int a = 0; a <= DB; a++) begin
      if (a > 0)
        for (int k = 0; k < NB; k++) check(cb_q[k] == pat(1, k, a - 1, 0), "B: consumer reads producer data");
      for (int k = 0; k < NB; k++) begin
        cb_ce[k] = (a < DB); cb_we[k] = 0; cb_addr[k] = AWB'(a % DB);
      end
      @(negedge clk);
    end
    for (int a = 0; a < DB; a++) begin
      for (int k = 0; k < NB; k++) begin
        cb_ce[k] = 1; cb_we[k] = 1; cb_addr[k] = AWB'(a); cb_din[k] = pat(1, k, a, 1);
      end
      @(negedge clk);
    end
    for (int k = 0; k < NB; k++) begin cb_ce[k] = 0; cb_we[k] = 0; end
    for (int a = 0; a <= DB; a++) begin
      if (a > 0)
        for (int k = 0; k < NB; k++) check(pb_q[k] == pat(1, k, a - 1, 1), "B: producer reads consumer data");
      for (int k = 0; k < NB; k++) begin pb_ce[k] = (a < DB); pb_addr[k] = AWB'(a % DB); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
