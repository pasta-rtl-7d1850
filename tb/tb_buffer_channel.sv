// tb_buffer_channel: end-to-end test of buffer_channel at its default
// parameters (20 x 40 words of 32 bits, two sections, two cyclic cores, S2P
// block RAM, two register stages on every pipelined path).
//
// A behavioural producer task streams CHUNKS arrays through the channel and
// a behavioural consumer task checks every word of every array. Phases:
// producer slow (consumer waits on an empty occupied FIFO), then consumer
// slow (producer waits on an empty free FIFO), with both at full speed in
// between so that the two overlap on different sections. The testbench
// checks and counts:
//   - initialisation: the first free token appears exactly SECTIONS cycles
//     after reset, with the free FIFO hidden until then;
//   - token pipelines: a released token reaches the consumer OS_STAGES + 1
//     cycles after the producer wrote it, and a returned token reaches the
//     producer FS_STAGES + 1 cycles after the consumer wrote it;
//   - ping-pong overlap: cycles where producer writes and consumer reads at
//     once, always on different sections;
//   - producer stalls and consumer stalls;
//   - every data word, and that all chunks arrive.
// A mechanism that never happens counts as a failure.
module tb_buffer_channel;
  import pasta_pkg::*;
  localparam int unsigned WIDTH = 32, NUM_CORES = 2, AW = 10, TW = 1, SECTIONS = 2;
  localparam int unsigned D0 = 20, D1 = 40, OS_STAGES = 2;
  localparam int unsigned CHUNKS = 12;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic [TW-1:0] p_fs_dout, p_os_din, c_os_dout, c_fs_din;
  logic p_fs_read, p_fs_empty, p_os_write, p_os_full;
  logic c_os_read, c_os_empty, c_fs_write, c_fs_full;
  logic [AW-1:0]    p_mem_addr [NUM_CORES], c_mem_addr [NUM_CORES];
  logic             p_mem_ce [NUM_CORES], p_mem_we [NUM_CORES], c_mem_ce [NUM_CORES], c_mem_we [NUM_CORES];
  logic [WIDTH-1:0] p_mem_din [NUM_CORES], p_mem_qout [NUM_CORES], c_mem_din [NUM_CORES], c_mem_qout [NUM_CORES];

  logic p_writing, c_reading, p_done, c_done;
  logic [TW-1:0] p_tok, c_tok;
  int p_stalls, p_first, rb_checks, rb_failures;
  int c_stalls, c_checks, c_failures, c_chunks, c_first_os;

  buffer_channel dut (.*);

  producer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .SLOW_FROM(1), .SLOW_TO(4), .GAP(1500)) u_prod (
    .clk, .rst, .fs_dout(p_fs_dout), .fs_read(p_fs_read), .fs_empty(p_fs_empty),
    .os_din(p_os_din), .os_write(p_os_write), .os_full(p_os_full),
    .mem_addr(p_mem_addr), .mem_ce(p_mem_ce), .mem_we(p_mem_we), .mem_din(p_mem_din), .mem_qout(p_mem_qout),
    .writing(p_writing), .cur_token(p_tok), .acquire_stalls(p_stalls), .first_token_cycle(p_first),
    .readback_checks(rb_checks), .readback_failures(rb_failures), .done(p_done));

  consumer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .SLOW_FROM(6), .SLOW_TO(9), .GAP(1500)) u_cons (
    .clk, .rst, .os_dout(c_os_dout), .os_read(c_os_read), .os_empty(c_os_empty),
    .fs_din(c_fs_din), .fs_write(c_fs_write), .fs_full(c_fs_full),
    .mem_addr(c_mem_addr), .mem_ce(c_mem_ce), .mem_we(c_mem_we), .mem_din(c_mem_din), .mem_qout(c_mem_qout),
    .reading(c_reading), .cur_token(c_tok), .acquire_stalls(c_stalls), .data_checks(c_checks),
    .data_failures(c_failures), .chunks_done(c_chunks), .first_os_cycle(c_first_os), .done(c_done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cycle = 0, first_release = -1, overlap = 0;
  int fs_release = -1, fs_seen = -1;
  localparam int unsigned FS_STAGES_TB = 2;
  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;
  always @(negedge clk) if (!rst) begin
    if (p_os_write && first_release < 0) first_release = cycle;
    // first token the consumer returns while the free FIFO is empty
    if (fs_release >= 0 && fs_seen < 0 && !p_fs_empty) fs_seen = cycle;
    if (c_fs_write && fs_release < 0 && p_fs_empty) fs_release = cycle;
    if (p_writing && c_reading) begin
      overlap++;
      if (p_tok == c_tok) begin
        failures++;
        $display("FAIL producer and consumer on the same section at %0t", $time);
      end
    end
  end

  task automatic finish_report();
    checks += c_checks + rb_checks;
    failures += c_failures + rb_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_report();
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (p_done && c_done);
    repeat (5) @(negedge clk);
    check(p_first == SECTIONS, $sformatf("first free token after SECTIONS cycles (got %0d)", p_first));
    check(c_first_os - first_release == OS_STAGES + 1,
          $sformatf("token pipeline latency OS_STAGES+1 (got %0d)", c_first_os - first_release));
    check(fs_release >= 0 && fs_seen - fs_release == FS_STAGES_TB + 1,
          $sformatf("free token pipeline latency FS_STAGES+1 (got %0d)", fs_seen - fs_release));
    check(c_chunks == CHUNKS, "all chunks consumed");
    check(c_checks == CHUNKS * D0 * D1, "every word checked");
    check(overlap > 0, "ping-pong overlap happened");
    check(p_stalls > 0, "producer stalled on an empty free sections FIFO");
    check(c_stalls > 0, "consumer stalled on an empty occupied sections FIFO");
    check(p_fs_empty == 0 && c_os_empty == 1, "all tokens back in the free FIFO at the end");
    $display("overlap cycles %0d, producer stall cycles %0d, consumer stall cycles %0d, words checked %0d",
             overlap, p_stalls, c_stalls, c_checks);
    finish_report();
  end
endmodule
