// stream_channel: a FIFO stream channel between two tasks, optionally
// pipelined on its write side.
//
// This is the channel a producer task uses to send words to a consumer task.
// When the two tasks sit in different regions of the device, the channel is
// placed at the reader and its write side is cut by STAGES registers: write
// and data travel forward, full travels back (fifo_write_pipe). The writer
// learns of a full FIFO STAGES cycles late and may send up to 2*STAGES more
// words, so the FIFO (srl_fifo) is built with 2*STAGES extra entries while
// it still reports full at DEPTH. Inside a buffer channel the occupied
// sections FIFO is one of these, carrying section tokens.
//
// Ports: w_* face the writing task (din, write, full), r_* the reading task
// (dout, read, empty; first-word-fall-through). Synchronous, active-high
// reset. A word written in cycle t is readable at cycle t + STAGES + 1.
// Throughput is one word per cycle as long as the FIFO does not reach DEPTH;
// where two paths of different pipeline depth meet at one reader, the
// shallower path's stream needs DEPTH above the difference in stages, or its
// writer is throttled by full.
// The write-side pipelining and the unchanged full threshold follow the
// published scheme; the default depth of 2 and two stages are this
// implementation's choices.
module stream_channel #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 2,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  // writing task
  input  logic [WIDTH-1:0] w_din,
  input  logic             w_write,
  output logic             w_full,
  // reading task
  output logic [WIDTH-1:0] r_dout,
  input  logic             r_read,
  output logic             r_empty
);
  logic [WIDTH-1:0] f_din;
  logic             f_write, f_full;

  fifo_write_pipe #(.WIDTH(WIDTH), .STAGES(STAGES)) u_pipe (
    .clk, .rst,
    .u_din(w_din), .u_write(w_write), .u_full(w_full),
    .f_din,        .f_write,          .f_full
  );

  srl_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .HEADROOM(2 * STAGES)) u_fifo (
    .clk, .rst,
    .din(f_din),    .write(f_write),  .full(f_full),
    .dout(r_dout),  .read(r_read),    .empty(r_empty)
  );

endmodule
