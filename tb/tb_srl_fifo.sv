// tb_srl_fifo: self-checking test of srl_fifo.
// Random writes and reads against a queue model. Every cycle it compares
// empty, full and dout with the model, checks that full rises at DEPTH while
// HEADROOM more words are still accepted, and that a word written into an
// empty FIFO is readable one cycle later.
module tb_srl_fifo;
  localparam int unsigned W = 8, DEPTH = 4, HEADROOM = 2, CAP = DEPTH + HEADROOM;

  logic clk = 0, rst = 1;
  logic [W-1:0] din, dout;
  logic write, read, full, empty;
  int checks = 0, failures = 0;
  int headroom_used = 0, one_cycle_ok = 0;
  logic [W-1:0] q[$];

  srl_fifo #(.WIDTH(W), .DEPTH(DEPTH), .HEADROOM(HEADROOM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 0; read = 0; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // latency: write into empty FIFO, readable next cycle
    check(empty, "empty after reset");
    din = 8'h5a; write = 1;
    @(negedge clk) write = 0;
    check(!empty && dout == 8'h5a, "word readable one cycle after write");
    read = 1;
    @(negedge clk) read = 0;
    check(empty, "empty after reading the only word");
    for (int n = 0; n < 4000; n++) begin
      bit wr, rd;
      // phases: fill hard, drain hard, random
      case ((n / 200) % 3)
        0: begin wr = ($urandom % 4) != 0; rd = ($urandom % 4) == 0; end
        1: begin wr = ($urandom % 4) == 0; rd = ($urandom % 4) != 0; end
        default: begin wr = 1'($urandom % 2); rd = 1'($urandom % 2); end
      endcase
      // keep writes within capacity (the pipelined writer may pass DEPTH)
      if (q.size() >= CAP) wr = 0;
      din = W'($urandom); write = wr; read = rd;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() >= DEPTH), "full at DEPTH");
      if (q.size() > 0) check(dout == q[0], "dout is oldest word");
      @(posedge clk);
      if (rd && q.size() > 0) void'(q.pop_front());
      if (wr) begin
        if (q.size() >= DEPTH) headroom_used++;
        q.push_back(din);
      end
      @(negedge clk);
    end
    check(headroom_used > 0, "headroom entries used");
    $display("headroom writes: %0d", headroom_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
