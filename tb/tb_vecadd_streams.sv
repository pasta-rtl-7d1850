// tb_vecadd_streams: the vector-addition task graph (load a, load b -> add
// -> store c) built from three stream_channel instances with different
// pipeline depths, as when the tasks are spread over several regions.
// The load, add and store tasks are behavioural models. Every element of c
// must equal a + b, and with all tasks always ready the graph must sustain
// one element per cycle: N elements finish within N + a fixed pipeline
// latency. The two input paths differ by SB - SA stages, so the a stream
// must hold that many extra words while add waits for b: the streams are
// given DEPTH = 4, enough for the skew of 2. A second pass with a stalling store task checks back-pressure
// through the add task.
module tb_vecadd_streams;
  localparam int unsigned N = 1000;
  localparam int unsigned SA = 1, SB = 3, SC = 2, DEPTH = 4;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cycle = 0;

  logic [31:0] a_din, b_din, c_din, a_dout, b_dout, c_dout;
  logic a_write, a_full, a_read, a_empty;
  logic b_write, b_full, b_read, b_empty;
  logic c_write, c_full, c_read, c_empty;

  logic [31:0] vec_a [N], vec_b [N], vec_c [N];
  int ia, ib, ic, t_start, t_end, store_stalls;
  bit slow_store;

  stream_channel #(.WIDTH(32), .DEPTH(DEPTH), .STAGES(SA)) u_a (.clk, .rst,
    .w_din(a_din), .w_write(a_write), .w_full(a_full), .r_dout(a_dout), .r_read(a_read), .r_empty(a_empty));
  stream_channel #(.WIDTH(32), .DEPTH(DEPTH), .STAGES(SB)) u_b (.clk, .rst,
    .w_din(b_din), .w_write(b_write), .w_full(b_full), .r_dout(b_dout), .r_read(b_read), .r_empty(b_empty));
  stream_channel #(.WIDTH(32), .DEPTH(DEPTH), .STAGES(SC)) u_c (.clk, .rst,
    .w_din(c_din), .w_write(c_write), .w_full(c_full), .r_dout(c_dout), .r_read(c_read), .r_empty(c_empty));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // tasks, all deciding at the falling edge
  always @(negedge clk) begin
    if (rst) begin
      a_write = 0; b_write = 0; c_write = 0; a_read = 0; b_read = 0; c_read = 0;
    end else begin
      // load a / load b
      a_write = (ia < N) && !a_full; a_din = vec_a[ia % N]; if (a_write) ia++;
      b_write = (ib < N) && !b_full; b_din = vec_b[ib % N]; if (b_write) ib++;
      // add
      a_read = !a_empty && !b_empty && !c_full; b_read = a_read;
      c_write = a_read; c_din = a_dout + b_dout;
      // store
      c_read = !c_empty && (!slow_store || $urandom % 3 == 0);
      if (!c_empty && !c_read) store_stalls++;
      if (c_read) begin vec_c[ic] = c_dout; ic++; end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(input bit slow);
    rst = 1; slow_store = slow; ia = 0; ib = 0; ic = 0; store_stalls = 0;
    for (int i = 0; i < N; i++) begin vec_a[i] = $urandom; vec_b[i] = $urandom; vec_c[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    // let the pipeline full flags settle before the loads start
    repeat (4) @(negedge clk);
    rst = 0;
    t_start = cycle;
    while (ic < N) @(negedge clk);
    t_end = cycle;
    for (int i = 0; i < N; i++) check(vec_c[i] == vec_a[i] + vec_b[i], "c = a + b");
  endtask

  initial begin
    run_pass(0);
    check(t_end - t_start <= N + 2 * SB + 8,
          $sformatf("one element per cycle: %0d cycles for %0d elements", t_end - t_start, N));
    $display("full-rate pass: %0d cycles for %0d elements", t_end - t_start, N);
    run_pass(1);
    check(store_stalls > 0, "store back-pressure happened");
    check(t_end - t_start > 2 * N, "slow store slowed the graph");
    $display("slow-store pass: %0d cycles, store stall cycles %0d", t_end - t_start, store_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
