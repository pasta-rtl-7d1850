// tb_buffer_channel_single: end-to-end test of buffer_channel with one
// section and no pipelining, the arrangement for two tasks placed next to
// each other that share one array.
//
// The buffer is 3 x 8 words of 32 bits, SECTIONS = 1, the second dimension
// partitioned cyclically by 4 (four cores of 1*3*2 = 6 words), true
// dual-port block RAM, and FS_STAGES = OS_STAGES = MEM_STAGES = 0. With one
// token the two tasks must take turns. The testbench checks and counts:
//   - initialisation: the single token appears 1 cycle after reset;
//   - unpipelined token paths: a released token reaches the other task
//     exactly 1 cycle after it was written, on both FIFOs;
//   - turn taking: producer and consumer are never active in the same
//     cycle, and each waits on an empty FIFO while the other works;
//   - producer read-back of its own section with the plain read latency 1;
//   - every data word, and that all chunks arrive.
// A mechanism that never happens counts as a failure.
module tb_buffer_channel_single;
  import pasta_pkg::*;
  localparam int unsigned WIDTH = 32, NUM_CORES = 4, AW = 3, TW = 1, SECTIONS = 1;
  localparam int unsigned D0 = 3, D1 = 8;
  localparam int unsigned CHUNKS = 30, READBACK = 4;

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

  buffer_channel #(
    .WIDTH(WIDTH), .DIMS('{D0, D1, 1}), .SCHEMES('{PART_NORMAL, PART_CYCLIC, PART_NORMAL}),
    .FACTORS('{1, 4, 1}), .SECTIONS(SECTIONS), .CORE(CORE_BRAM), .PORTS(PORTS_T2P),
    .FS_STAGES(0), .OS_STAGES(0), .MEM_STAGES(0)
  ) dut (.*);

  producer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .READBACK(READBACK), .READ_LAT(1),
                  .SLOW_FROM(3), .SLOW_TO(6), .GAP(20)) u_prod (
    .clk, .rst, .fs_dout(p_fs_dout), .fs_read(p_fs_read), .fs_empty(p_fs_empty),
    .os_din(p_os_din), .os_write(p_os_write), .os_full(p_os_full),
    .mem_addr(p_mem_addr), .mem_ce(p_mem_ce), .mem_we(p_mem_we), .mem_din(p_mem_din), .mem_qout(p_mem_qout),
    .writing(p_writing), .cur_token(p_tok), .acquire_stalls(p_stalls), .first_token_cycle(p_first),
    .readback_checks(rb_checks), .readback_failures(rb_failures), .done(p_done));

  consumer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .SLOW_FROM(10), .SLOW_TO(14), .GAP(20)) u_cons (
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

  // Every release must be seen by the other task exactly one cycle later.
  int cycle = 0, os_lat_ok = 0, fs_lat_ok = 0, os_sent = -1, fs_sent = -1;
  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;
  always @(negedge clk) if (!rst) begin
    if (os_sent >= 0 && cycle == os_sent + 1) begin
      checks++;
      if (!c_os_empty) os_lat_ok++;
      else begin failures++; $display("FAIL occupied token late at %0t", $time); end
    end
    if (fs_sent >= 0 && cycle == fs_sent + 1) begin
      checks++;
      if (!p_fs_empty) fs_lat_ok++;
      else begin failures++; $display("FAIL free token late at %0t", $time); end
    end
    if (p_os_write) begin
      os_sent = cycle;
      check(c_os_empty, "occupied FIFO empty in the cycle the token is released");
    end
    if (c_fs_write) begin
      fs_sent = cycle;
      check(p_fs_empty, "free FIFO empty in the cycle the token is returned");
    end
    if (p_writing && c_reading) begin
      failures++;
      $display("FAIL producer and consumer active at once on a single section at %0t", $time);
    end
  end

  task automatic finish_report();
    checks += c_checks + rb_checks;
    failures += c_failures + rb_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_report();
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (p_done && c_done);
    repeat (5) @(negedge clk);
    check(p_first == SECTIONS, $sformatf("single token after 1 cycle (got %0d)", p_first));
    check(os_lat_ok == CHUNKS, $sformatf("every occupied token after 1 cycle (got %0d)", os_lat_ok));
    check(fs_lat_ok == CHUNKS, $sformatf("every free token after 1 cycle (got %0d)", fs_lat_ok));
    check(c_chunks == CHUNKS, "all chunks consumed");
    check(c_checks == CHUNKS * D0 * D1, "every word checked");
    check(rb_checks == CHUNKS * READBACK, "every read-back word checked");
    check(p_stalls > 0, "producer waited for the consumer");
    check(c_stalls > 0, "consumer waited for the producer");
    check(p_fs_empty == 0 && c_os_empty == 1, "the token is back in the free FIFO at the end");
    $display("producer stall cycles %0d, consumer stall cycles %0d, words checked %0d, read-back %0d",
             p_stalls, c_stalls, c_checks, rb_checks);
    finish_report();
  end
endmodule
