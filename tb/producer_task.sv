// producer_task: behavioural model of an HLS producer task on a buffer
// channel (testbench only, not synthesizable).
//
// For each of CHUNKS chunks it acquires a free section token, writes the
// whole D0 x D1 array into that section through the per-core memory ports
// (the second dimension is partitioned cyclically over NUM_CORES cores, so
// NUM_CORES elements are written per cycle), optionally reads the first
// READBACK elements back and checks them, and then releases the token to the
// occupied sections FIFO. Element (c, i, j) holds elem_value(c, i, j).
// Read-back data is checked exactly READ_LAT cycles after the read, the read
// latency of a pipelined memory port. SLOW_FROM..SLOW_TO chunks are followed
// by idle gaps, which makes the consumer wait on an empty occupied FIFO.
module producer_task #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned NUM_CORES = 2,
  parameter int unsigned AW        = 10,
  parameter int unsigned TW        = 1,
  parameter int unsigned D0        = 20,
  parameter int unsigned D1        = 40,
  parameter int unsigned CHUNKS    = 8,
  parameter int unsigned READBACK  = 0,
  parameter int unsigned READ_LAT  = 1,
  parameter int unsigned SLOW_FROM = 0,
  parameter int unsigned SLOW_TO   = 0,
  parameter int unsigned GAP       = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [TW-1:0]    fs_dout,
  output logic             fs_read,
  input  logic             fs_empty,
  output logic [TW-1:0]    os_din,
  output logic             os_write,
  input  logic             os_full,
  output logic [AW-1:0]    mem_addr [NUM_CORES],
  output logic             mem_ce   [NUM_CORES],
  output logic             mem_we   [NUM_CORES],
  output logic [WIDTH-1:0] mem_din  [NUM_CORES],
  input  logic [WIDTH-1:0] mem_qout [NUM_CORES],
  // status for the testbench
  output logic             writing,
  output logic [TW-1:0]    cur_token,
  output int               acquire_stalls,
  output int               first_token_cycle,
  output int               readback_checks,
  output int               readback_failures,
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
    fs_read = 0; os_write = 0; os_din = '0; writing = 0; cur_token = '0; done = 0;
    acquire_stalls = 0; first_token_cycle = -1; readback_checks = 0; readback_failures = 0;
    for (int k = 0; k < NUM_CORES; k++) begin
      mem_addr[k] = '0; mem_ce[k] = 0; mem_we[k] = 0; mem_din[k] = '0;
    end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int c = 0; c < CHUNKS; c++) begin
      // acquire
      while (fs_empty) begin
        if (first_token_cycle >= 0) acquire_stalls++;
        @(negedge clk);
      end
      if (first_token_cycle < 0) first_token_cycle = cycle;
      cur_token = fs_dout;
      fs_read = 1;
      @(negedge clk);
      fs_read = 0;
      // write the section
      writing = 1;
      for (int i = 0; i < D0; i++)
        for (int jj = 0; jj < PER_ROW; jj++) begin
          for (int k = 0; k < NUM_CORES; k++) begin
            mem_ce[k] = 1; mem_we[k] = 1;
            mem_addr[k] = AW'(int'(cur_token) * SEC + i * PER_ROW + jj);
            mem_din[k]  = elem_value(c, i, jj * NUM_CORES + k);
          end
          @(negedge clk);
        end
      // read back the first READBACK words of core 0 (back to back)
      for (int r = 0; r < READBACK + READ_LAT; r++) begin
        if (r < READBACK) begin
          mem_ce[0] = 1; mem_we[0] = 0; mem_addr[0] = AW'(int'(cur_token) * SEC + r);
        end else mem_ce[0] = 0;
        for (int k = 1; k < NUM_CORES; k++) mem_ce[k] = 0;
        if (r >= READ_LAT) begin
          readback_checks++;
          if (mem_qout[0] != elem_value(c, (r - READ_LAT) / PER_ROW, ((r - READ_LAT) % PER_ROW) * NUM_CORES)) begin
            readback_failures++;
            $display("FAIL producer read-back chunk %0d word %0d at %0t", c, r - READ_LAT, $time);
          end
        end
        @(negedge clk);
      end
      for (int k = 0; k < NUM_CORES; k++) begin mem_ce[k] = 0; mem_we[k] = 0; end
      writing = 0;
      // release
      while (os_full) @(negedge clk);
      os_din = cur_token; os_write = 1;
      @(negedge clk);
      os_write = 0;
      if (c >= SLOW_FROM && c < SLOW_TO) repeat (GAP) @(negedge clk);
    end
    done = 1;
  end
endmodule
