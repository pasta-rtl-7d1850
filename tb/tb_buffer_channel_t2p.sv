// tb_buffer_channel_t2p: end-to-end test of buffer_channel in its true
// dual-port configuration on UltraRAM cores, where the producer also reads
// the section it wrote.
//
// The buffer is 4 x 6 words of 16 bits, three sections (triple buffering),
// second dimension partitioned cyclically by 3 (three cores of 3*4*2 = 24
// words), with 1, 3 and 2 register stages on the free FIFO, occupied FIFO
// and producer memory paths, and a cascade height of 1 (no cascading; a
// synthesis setting only, so it must not change behaviour). Besides everything tb_buffer_channel checks, the
// producer reads back part of each section and every read-back word must
// arrive exactly 1 + 2*MEM_STAGES = 5 cycles after its read.
module tb_buffer_channel_t2p;
  import pasta_pkg::*;
  localparam int unsigned WIDTH = 16, NUM_CORES = 3, AW = 5, TW = 2, SECTIONS = 3;
  localparam int unsigned D0 = 4, D1 = 6, OS_STAGES = 3, MEM_STAGES = 2;
  localparam int unsigned CHUNKS = 40, READBACK = 6;

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
    .FACTORS('{1, 3, 1}), .SECTIONS(SECTIONS), .CORE(CORE_URAM), .PORTS(PORTS_T2P),
    .CASCADE_HEIGHT(1),
    .FS_STAGES(1), .OS_STAGES(OS_STAGES), .MEM_STAGES(MEM_STAGES)
  ) dut (.*);

  producer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .READBACK(READBACK), .READ_LAT(1 + 2 * MEM_STAGES),
                  .SLOW_FROM(2), .SLOW_TO(10), .GAP(150)) u_prod (
    .clk, .rst, .fs_dout(p_fs_dout), .fs_read(p_fs_read), .fs_empty(p_fs_empty),
    .os_din(p_os_din), .os_write(p_os_write), .os_full(p_os_full),
    .mem_addr(p_mem_addr), .mem_ce(p_mem_ce), .mem_we(p_mem_we), .mem_din(p_mem_din), .mem_qout(p_mem_qout),
    .writing(p_writing), .cur_token(p_tok), .acquire_stalls(p_stalls), .first_token_cycle(p_first),
    .readback_checks(rb_checks), .readback_failures(rb_failures), .done(p_done));

  consumer_task #(.WIDTH(WIDTH), .NUM_CORES(NUM_CORES), .AW(AW), .TW(TW), .D0(D0), .D1(D1),
                  .CHUNKS(CHUNKS), .SLOW_FROM(15), .SLOW_TO(25), .GAP(150)) u_cons (
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
  localparam int unsigned FS_STAGES_TB = 1;
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
    check(rb_checks == CHUNKS * READBACK, "producer read-back after 1 + 2*MEM_STAGES cycles ran");
    check(p_stalls > 0, "producer stalled on an empty free sections FIFO");
    check(c_stalls > 0, "consumer stalled on an empty occupied sections FIFO");
    check(p_fs_empty == 0 && c_os_empty == 1, "all tokens back in the free FIFO at the end");
    $display("overlap cycles %0d, producer stall cycles %0d, consumer stall cycles %0d, words checked %0d",
             overlap, p_stalls, c_stalls, c_checks);
    finish_report();
  end
endmodule
