// consumer_task: behavioural model of an HLS consumer task on a buffer
// channel (testbench only, not synthesizable).
//
// For each of CHUNKS chunks it acquires a filled section token from the
// occupied sections FIFO, reads the whole D0 x D1 array from that section
// (NUM_CORES words per cycle, second dimension partitioned cyclically) and
// checks every word, one cycle after the read, against the value the
// producer model wrote for that chunk. Then it returns the token to the free
// sections FIFO. Chunks SLOW_FROM..SLOW_TO are followed by GAP idle cycles,
// which makes the producer wait on an empty free sections FIFO.
module consumer_task #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned NUM_CORES = 2,
  parameter int unsigned AW        = 10,
  parameter int unsigned TW        = 1,
  parameter int unsigned D0        = 20,
  parameter int unsigned D1        = 40,
  parameter int unsigned CHUNKS    = 8,
  parameter int unsigned SLOW_FROM = 0,
  parameter int unsigned SLOW_TO   = 0,
  parameter int unsigned GAP       = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [TW-1:0]    os_dout,
  output logic             os_read,
  input  logic             os_empty,
  output logic [TW-1:0]    fs_din,
  output logic             fs_write,
  input  logic             fs_full,
  output logic [AW-1:0]    mem_addr [NUM_CORES],
  output logic             mem_ce   [NUM_CORES],
  output logic             mem_we   [NUM_CORES],
  output logic [WIDTH-1:0] mem_din  [NUM_CORES],
  input  logic [WIDTH-1:0] mem_qout [NUM_CORES],
  // status for the testbench
  output logic             reading,
  output logic [TW-1:0]    cur_token,
  output int               acquire_stalls,
  output int               data_checks,
  output int               data_failures,
  output int               chunks_done,
  output int               first_os_cycle,
  output bit               done
);
  localparam int unsigned PER_ROW = D1 / NUM_CORES;
  localparam int unsigned SEC     = D0 * PER_ROW;

  function automatic logic [WIDTH-1:0] elem_value(input int c, input int i, input int j);
    return WIDTH'((c << 20) ^ (i << 10) ^ j ^ 32'h5a5a_0000);
  endfunction

  int cycle = 0;
  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  initial begin
    os_read = 0; fs_write = 0; fs_din = '0; reading = 0; cur_token = '0; done = 0;
    acquire_stalls = 0; data_checks = 0; data_failures = 0; chunks_done = 0; first_os_cycle = -1;
    for (int k = 0; k < NUM_CORES; k++) begin
      mem_addr[k] = '0; mem_ce[k] = 0; mem_we[k] = 0; mem_din[k] = '0;
    end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int c = 0; c < CHUNKS; c++) begin
      while (os_empty) begin
        acquire_stalls++;
        @(negedge clk);
      end
      if (first_os_cycle < 0) first_os_cycle = cycle;
      cur_token = os_dout;
      os_read = 1;
      @(negedge clk);
      os_read = 0;
      reading = 1;
      for (int n = 0; n <= int'(SEC); n++) begin
        if (n > 0)
          for (int k = 0; k < NUM_CORES; k++) begin
            data_checks++;
            if (mem_qout[k] != elem_value(c, (n - 1) / PER_ROW, ((n - 1) % PER_ROW) * NUM_CORES + k)) begin
              data_failures++;
              if (data_failures < 10)
                $display("FAIL consumer data chunk %0d word %0d core %0d at %0t", c, n - 1, k, $time);
            end
          end
        for (int k = 0; k < NUM_CORES; k++) begin
          mem_ce[k] = (n < int'(SEC)); mem_we[k] = 0;
          mem_addr[k] = AW'(int'(cur_token) * SEC + ((n < int'(SEC)) ? n : 0));
        end
        @(negedge clk);
      end
      reading = 0;
      while (fs_full) @(negedge clk);
      fs_din = cur_token; fs_write = 1;
      @(negedge clk);
      fs_write = 0;
      chunks_done++;
      if (c >= SLOW_FROM && c < SLOW_TO) repeat (GAP) @(negedge clk);
    end
    done = 1;
  end
endmodule
