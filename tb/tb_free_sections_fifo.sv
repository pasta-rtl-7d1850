// tb_free_sections_fifo: self-checking test of free_sections_fifo.
// After reset the relay must show empty to the producer side and full to the
// consumer side for exactly SECTIONS cycles; then tokens 0..SECTIONS-1 must
// come out in order. Afterwards tokens returned by the consumer side must be
// handed back to the producer side in order, with empty/full tracking a
// model. A second reset must refill the FIFO from scratch.
module tb_free_sections_fifo;
  localparam int unsigned S = 4, TW = 2;

  logic clk = 0, rst = 1;
  logic [TW-1:0] dout, din;
  logic read, empty, write, full;
  int checks = 0, failures = 0;
  logic [TW-1:0] q[$];

  free_sections_fifo #(.SECTIONS(S)) dut (.*);

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

  task automatic reset_and_init();
    int cyc;
    rst = 1; read = 0; write = 0; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    cyc = 0;
    while (empty) begin
      check(full, "relay shows full to the consumer during init");
      cyc++;
      @(negedge clk);
      if (cyc > 20) break;
    end
    check(cyc == S, $sformatf("init takes SECTIONS cycles (took %0d)", cyc));
    q.delete();
    for (int i = 0; i < S; i++) q.push_back(TW'(i));
  endtask

  initial begin
    reset_and_init();
    // drain all initial tokens in order
    for (int i = 0; i < S; i++) begin
      check(!empty && dout == TW'(i), "initial token order");
      read = 1; @(negedge clk); read = 0;
    end
    q.delete();
    check(empty, "empty after taking every token");
    // random return/take traffic; only tokens that are out may be returned
    begin
      logic [TW-1:0] out[$];
      for (int i = 0; i < S; i++) out.push_back(TW'(i));
      for (int n = 0; n < 3000; n++) begin
        bit wr, rd;
        int pick;
        wr = (out.size() > 0) && ($urandom % 2 == 1);
        rd = 1'($urandom % 2);
        pick = (out.size() > 0) ? int'($urandom % out.size()) : 0;
        din = (out.size() > 0) ? out[pick] : '0;
        write = wr; read = rd;
        check(empty == (q.size() == 0), "empty");
        check(full == (q.size() >= S), "full");
        if (q.size() > 0) check(dout == q[0], "token order");
        @(posedge clk);
        if (rd && q.size() > 0) out.push_back(q.pop_front());
        if (wr) begin q.push_back(din); out.delete(pick); end
        @(negedge clk);
      end
      write = 0; read = 0;
    end
    // second reset refills
    reset_and_init();
    for (int i = 0; i < S; i++) begin
      check(!empty && dout == TW'(i), "token order after second reset");
      read = 1; @(negedge clk); read = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
