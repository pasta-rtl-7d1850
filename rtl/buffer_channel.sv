// buffer_channel: a latency-insensitive ping-pong buffer between a producer
// task and a consumer task, with the pipelining used when the two tasks sit
// in different regions of a multi-die FPGA.
//
// The memory is split into SECTIONS sections. Who owns a section is carried
// by tokens (section numbers) that live in two FIFOs:
//   free sections FIFO     - sections holding no valid data. Filled with every
//                            token after reset. The producer reads a token
//                            here, writes that section, then writes the token
//                            to the occupied sections FIFO.
//   occupied sections FIFO - sections holding data not yet consumed. The
//                            consumer reads a token here, reads that section,
//                            then returns the token to the free sections FIFO.
// While the producer fills one section the consumer can drain another, so
// with two sections the two tasks overlap (double buffering). Tasks only see
// ap_fifo ports (dout/read/empty, din/write/full) and ap_memory ports
// (addr/ce/we/din/qout), so they can come from an HLS tool; nothing in the
// channel knows about the tasks' own state machines.
//
// Placement and pipelining: the free sections FIFO is placed at the producer
// and its write side (from the consumer) is cut by FS_STAGES registers; the
// occupied sections FIFO and the memory module are placed at the consumer,
// and the producer's token writes and memory ports are cut by OS_STAGES and
// MEM_STAGES registers. Each token FIFO gets 2*stages of headroom so that
// writes in flight are never lost. Producer memory reads then take
// 1 + 2*MEM_STAGES cycles; consumer reads take 1 cycle.
//
// Ports: p_* belong to the producer task, c_* to the consumer task; p_fs_*
// and c_fs_* are the two sides of the free sections FIFO, p_os_* and c_os_*
// of the occupied one, p_mem_*/c_mem_* the per-core memory ports. All
// synchronous to clk, reset synchronous and active high; the first free
// token is readable SECTIONS cycles after reset is released.
//
// The structure (two token FIFOs, self-initialising free FIFO, memory cores
// with one port per task, placement and pipelining sides) follows the
// published design. The default buffer is the published usage example
// (20 x 40 words of 32 bits, two sections, second dimension partitioned
// cyclically, block RAM, simple dual-port because that producer only
// writes); the cyclic factor of 2 and the two register stages per crossing
// are this implementation's choices, the latter matching the two registers
// drawn per path in the published placement example. CASCADE_HEIGHT is
// passed to the memory cores as the synthesis tool's limit on chained RAMs
// (16 by default, as published; 1 = no cascading).
module buffer_channel
  import pasta_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter dims_t       DIMS       = '{20, 40, 1},
  parameter parts_t      SCHEMES    = '{PART_NORMAL, PART_CYCLIC, PART_NORMAL},
  parameter dims_t       FACTORS    = '{1, 2, 1},
  parameter int unsigned SECTIONS   = 2,
  parameter core_type_e  CORE       = CORE_BRAM,
  parameter core_ports_e PORTS      = PORTS_S2P,
  parameter int unsigned CASCADE_HEIGHT = 16,
  parameter int unsigned FS_STAGES  = 2,
  parameter int unsigned OS_STAGES  = 2,
  parameter int unsigned MEM_STAGES = 2,
  localparam int unsigned NUM_CORES  = num_cores(DIMS, SCHEMES, FACTORS),
  localparam int unsigned CORE_DEPTH = core_depth(DIMS, SCHEMES, FACTORS, SECTIONS),
  localparam int unsigned AW         = (CORE_DEPTH <= 2) ? 1 : $clog2(CORE_DEPTH),
  localparam int unsigned TW         = token_width(SECTIONS)
) (
  input  logic             clk,
  input  logic             rst,

  // ---- producer side ----
  // free sections FIFO, read side: acquire a section
  output logic [TW-1:0]    p_fs_dout,
  input  logic             p_fs_read,
  output logic             p_fs_empty,
  // occupied sections FIFO, write side: release a filled section
  input  logic [TW-1:0]    p_os_din,
  input  logic             p_os_write,
  output logic             p_os_full,
  // memory ports
  input  logic [AW-1:0]    p_mem_addr [NUM_CORES],
  input  logic             p_mem_ce   [NUM_CORES],
  input  logic             p_mem_we   [NUM_CORES],
  input  logic [WIDTH-1:0] p_mem_din  [NUM_CORES],
  output logic [WIDTH-1:0] p_mem_qout [NUM_CORES],

  // ---- consumer side ----
  // occupied sections FIFO, read side: acquire a filled section
  output logic [TW-1:0]    c_os_dout,
  input  logic             c_os_read,
  output logic             c_os_empty,
  // free sections FIFO, write side: release a drained section
  input  logic [TW-1:0]    c_fs_din,
  input  logic             c_fs_write,
  output logic             c_fs_full,
  // memory ports
  input  logic [AW-1:0]    c_mem_addr [NUM_CORES],
  input  logic             c_mem_ce   [NUM_CORES],
  input  logic             c_mem_we   [NUM_CORES],
  input  logic [WIDTH-1:0] c_mem_din  [NUM_CORES],
  output logic [WIDTH-1:0] c_mem_qout [NUM_CORES]
);
  // ---------------- free sections FIFO (at the producer) ----------------
  logic [TW-1:0] fs_din;
  logic          fs_write, fs_full;

  fifo_write_pipe #(.WIDTH(TW), .STAGES(FS_STAGES)) u_fs_pipe (
    .clk, .rst,
    .u_din(c_fs_din), .u_write(c_fs_write), .u_full(c_fs_full),
    .f_din(fs_din),   .f_write(fs_write),   .f_full(fs_full)
  );

  free_sections_fifo #(.SECTIONS(SECTIONS), .HEADROOM(2 * FS_STAGES)) u_fs (
    .clk, .rst,
    .dout(p_fs_dout), .read(p_fs_read), .empty(p_fs_empty),
    .din(fs_din),     .write(fs_write), .full(fs_full)
  );

  // -------------- occupied sections FIFO (at the consumer) --------------
  stream_channel #(.WIDTH(TW), .DEPTH(SECTIONS), .STAGES(OS_STAGES)) u_os (
    .clk, .rst,
    .w_din(p_os_din),   .w_write(p_os_write), .w_full(p_os_full),
    .r_dout(c_os_dout), .r_read(c_os_read),   .r_empty(c_os_empty)
  );

  // ------------------ memory module (at the consumer) -------------------
  logic [AW-1:0]    m_addr [NUM_CORES];
  logic             m_ce   [NUM_CORES];
  logic             m_we   [NUM_CORES];
  logic [WIDTH-1:0] m_din  [NUM_CORES];
  logic [WIDTH-1:0] m_qout [NUM_CORES];

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_mem_pipe
    mem_port_pipe #(.WIDTH(WIDTH), .AW(AW), .STAGES(MEM_STAGES)) u_pipe (
      .clk, .rst,
      .t_addr(p_mem_addr[k]), .t_ce(p_mem_ce[k]), .t_we(p_mem_we[k]),
      .t_din(p_mem_din[k]),   .t_qout(p_mem_qout[k]),
      .m_addr(m_addr[k]), .m_ce(m_ce[k]), .m_we(m_we[k]),
      .m_din(m_din[k]),   .m_qout(m_qout[k])
    );

    // Simple dual-port cores cannot be read from the producer side.
    if (PORTS == PORTS_S2P) begin : g_s2p_rule
      a_p_write_only: assert property (@(posedge clk) disable iff (rst)
          p_mem_ce[k] |-> p_mem_we[k])
        else $error("buffer_channel: producer read on a simple dual-port core");
    end
  end

  memory_module #(
    .WIDTH(WIDTH), .DIMS(DIMS), .SCHEMES(SCHEMES), .FACTORS(FACTORS),
    .SECTIONS(SECTIONS), .CORE(CORE), .PORTS(PORTS),
    .CASCADE_HEIGHT(CASCADE_HEIGHT)
  ) u_mem (
    .clk,
    .p_addr(m_addr),     .p_ce(m_ce), .p_we(m_we),
    .p_din(m_din),       .p_qout(m_qout),
    .c_addr(c_mem_addr), .c_ce(c_mem_ce), .c_we(c_mem_we),
    .c_din(c_mem_din),   .c_qout(c_mem_qout)
  );

endmodule
