// srl_fifo: shift-register FIFO with an ap_fifo style interface.
//
// This is the FIFO used for stream channels between tasks and, inside a
// buffer channel, as the occupied sections FIFO. Storage is a shift register:
// a write shifts every entry one place up and puts the new word in entry 0;
// the oldest word sits at entry count-1 and is selected by a multiplexer, the
// arrangement that maps onto shift-register LUTs (SRLs) on an FPGA.
//
// Interface, all on the rising edge of clk, synchronous active-high reset:
//   write side: din, write, full.  A word is taken when write is high and the
//               FIFO still has a free entry.
//   read side:  dout, read, empty. First-word-fall-through: dout shows the
//               oldest word whenever empty is low; read pops it.
// A word written in cycle t can be read from cycle t+1.
//
// HEADROOM extra entries let the FIFO sit behind a write-side pipeline: the
// FIFO has DEPTH + HEADROOM entries but raises full once DEPTH words are held,
// so writes already in flight when full is raised still find room. That is
// the published way of pipelining a FIFO channel; with HEADROOM = 0 this is
// a plain FIFO of DEPTH entries. The SRL storage style follows the published
// design; the first-word-fall-through read and the reset behaviour are
// this implementation's choices.
module srl_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 2,
  parameter int unsigned HEADROOM = 0
) (
  input  logic             clk,
  input  logic             rst,
  // write side
  input  logic [WIDTH-1:0] din,
  input  logic             write,
  output logic             full,
  // read side
  output logic [WIDTH-1:0] dout,
  input  logic             read,
  output logic             empty
);
  localparam int unsigned CAP = DEPTH + HEADROOM;
  localparam int unsigned CW  = $clog2(CAP + 1);
  localparam int unsigned IW  = (CAP <= 2) ? 1 : $clog2(CAP);

  logic [WIDTH-1:0] mem [CAP];
  logic [CW-1:0]    count;
  logic             push, pop;
  logic [IW-1:0]    head;

  assign empty = (count == '0);
  assign full  = (count >= CW'(DEPTH));
  assign pop   = read && !empty;
  assign push  = write && (count < CW'(CAP));
  assign head  = (count == '0) ? '0 : IW'(count - 1'b1);
  assign dout  = mem[head];

  always_ff @(posedge clk) begin
    if (push) begin
      mem[0] <= din;
      for (int i = 1; i < CAP; i++) mem[i] <= mem[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + CW'(push) - CW'(pop);
  end

  // A write that finds no room would be lost.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) write |-> count < CW'(CAP))
    else $error("srl_fifo: write into a FIFO with no free entry");

endmodule
