// tb_stream_channel: self-checking test of stream_channel (DEPTH 2,
// 3 register stages).
//   Phase 1: reader always ready. N words must arrive in order at one word
//            per cycle, the first one STAGES + 1 cycles after it was written.
//   Phase 2: slow reader. The writer writes whenever it sees full low; full
//            must reach it, the FIFO must take words beyond its depth (the
//            headroom) and none may be lost or reordered.
module tb_stream_channel;
  localparam int unsigned W = 16, DEPTH = 2, STAGES = 3, N = 200;

  logic clk = 0, rst = 1;
  logic [W-1:0] w_din, r_dout;
  logic w_write, w_full, r_read, r_empty;
  int checks = 0, failures = 0, cycle = 0;
  int first_write = -1, first_read = -1, last_read = -1, stalls = 0, beyond = 0;
  logic [W-1:0] sent[$], got[$];

  stream_channel #(.WIDTH(W), .DEPTH(DEPTH), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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
    w_write = 0; w_din = 0; r_read = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (STAGES + 1) @(negedge clk);
    // phase 1: full rate
    r_read = 1;
    for (int n = 0; n < N + 3 * STAGES + 4; n++) begin
      w_write = (n < N) && !w_full;
      w_din = W'(n * 7 + 1);
      if (w_write) begin sent.push_back(w_din); if (first_write < 0) first_write = cycle; end
      if (!r_empty) begin
        got.push_back(r_dout);
        if (first_read < 0) first_read = cycle;
        last_read = cycle;
      end
      @(negedge clk);
    end
    w_write = 0;
    check(sent.size() == N, "writer never stalled at full rate");
    check(first_read - first_write == STAGES + 1, $sformatf("first word after STAGES+1 cycles (%0d)", first_read - first_write));
    check(last_read - first_read == N - 1, $sformatf("one word per cycle (%0d cycles for %0d words)", last_read - first_read + 1, N));
    check(got.size() == N, "all words arrived");
    for (int i = 0; i < got.size() && i < sent.size(); i++) check(got[i] == sent[i], "phase 1 order");
    sent.delete(); got.delete();
    // phase 2: slow reader
    for (int n = 0; n < 3000; n++) begin
      w_write = !w_full;
      if (w_full) stalls++;
      w_din = W'($urandom);
      r_read = ($urandom % 4 == 0);
      if (w_write) sent.push_back(w_din);
      if (r_read && !r_empty) got.push_back(r_dout);
      // more words outstanding than the pipe and the nominal depth can hold
      if (sent.size() - got.size() > DEPTH + STAGES) beyond++;
      @(negedge clk);
    end
    w_write = 0; r_read = 1;
    repeat (40) begin
      if (!r_empty) got.push_back(r_dout);
      @(negedge clk);
    end
    check(stalls > 0, "writer saw full");
    check(beyond > 0, "headroom used");
    check(got.size() == sent.size(), "no word lost");
    for (int i = 0; i < got.size() && i < sent.size(); i++) check(got[i] == sent[i], "phase 2 order");
    $display("stall cycles %0d, headroom writes %0d", stalls, beyond);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
