// tb_fifo_write_pipe: self-checking test of fifo_write_pipe in front of an
// srl_fifo with 2*STAGES headroom, the arrangement of a pipelined FIFO
// channel. A greedy writer writes whenever it sees full low; a random reader
// drains the FIFO. Checked: write/data reach the FIFO exactly STAGES cycles
// later, full reaches the writer exactly STAGES cycles later, the word order
// is kept, no write is ever lost (the FIFO's overflow assertion would stop
// the run), and the headroom beyond the FIFO's nominal depth is really used.
module tb_fifo_write_pipe;
  localparam int unsigned W = 8, STAGES = 3, DEPTH = 4;

  logic clk = 0, rst = 1;
  logic [W-1:0] u_din, f_din, dout;
  logic u_write, u_full, f_write, f_full, read, empty;
  int checks = 0, failures = 0, beyond_depth = 0, writer_stalls = 0;
  logic [W-1:0] sent[$], got[$];
  logic [W-1:0] din_hist [$];
  logic         wr_hist [$];
  logic         full_hist [$];
  logic [W-1:0] next_word = 0;

  fifo_write_pipe #(.WIDTH(W), .STAGES(STAGES)) dut (.*);
  srl_fifo #(.WIDTH(W), .DEPTH(DEPTH), .HEADROOM(2 * STAGES)) u_fifo (
    .clk, .rst, .din(f_din), .write(f_write), .full(f_full),
    .dout, .read, .empty);

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
    u_write = 0; u_din = 0; read = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      // greedy writer; the reader runs slow, then fast
      u_write = !u_full && ((n / 500) % 2 == 0 || $urandom % 3 == 0);
      if (u_full) writer_stalls++;
      u_din = next_word;
      read = ((n / 500) % 2 == 0) ? ($urandom % 5 == 0) : ($urandom % 5 != 0);
      // delays: compare with what the writer did STAGES cycles ago
      if (n >= STAGES) begin
        check(f_write == wr_hist[0], "write delayed by STAGES");
        if (f_write) check(f_din == din_hist[0], "data delayed by STAGES");
        check(u_full == full_hist[0], "full delayed by STAGES");
      end
      if (f_write && f_full) beyond_depth++;
      if (n >= STAGES) begin
        void'(wr_hist.pop_front()); void'(din_hist.pop_front()); void'(full_hist.pop_front());
      end
      wr_hist.push_back(u_write); din_hist.push_back(u_din); full_hist.push_back(f_full);
      if (u_write) begin sent.push_back(u_din); next_word++; end
      if (read && !empty) got.push_back(dout);
      @(negedge clk);
    end
    u_write = 0;
    // drain
    read = 1;
    repeat (40) begin
      if (!empty) got.push_back(dout);
      @(negedge clk);
    end
    check(got.size() == sent.size(), $sformatf("words delivered %0d of %0d", got.size(), sent.size()));
    for (int i = 0; i < got.size() && i < sent.size(); i++) check(got[i] == sent[i], "word order");
    check(beyond_depth > 0, "writes absorbed by the headroom");
    check(writer_stalls > 0, "writer stalled on full");
    $display("headroom writes %0d, writer stall cycles %0d", beyond_depth, writer_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
