// tb_mem_port_pipe: self-checking test of mem_port_pipe in front of a
// true dual-port memory core. The task side issues random reads and writes.
// Checked: address, en, we and data reach the memory exactly STAGES cycles
// later; each read's data comes back exactly 1 + 2*STAGES cycles after the
// read was issued, equal to an array model that applies writes in issue
// order.
module tb_mem_port_pipe;
  import pasta_pkg::*;
  localparam int unsigned W = 16, AW = 4, D = 16, STAGES = 2, RL = 1 + 2 * STAGES;

  logic clk = 0, rst = 1;
  logic [AW-1:0] t_addr, m_addr;
  logic t_ce, t_we, m_ce, m_we;
  logic [W-1:0] t_din, t_qout, m_din, m_qout, unused_q;
  int checks = 0, failures = 0, reads = 0;
  logic [W-1:0] model [D];
  // expected read data by the cycle it is due
  logic [W-1:0] due_data [int];
  typedef struct packed { logic [AW-1:0] addr; logic ce, we; logic [W-1:0] din; } req_t;
  req_t hist[$];

  mem_port_pipe #(.WIDTH(W), .AW(AW), .STAGES(STAGES)) dut (.*);
  mem_core_t2p #(.WIDTH(W), .DEPTH(D)) u_mem (
    .clk, .addr_a(m_addr), .ce_a(m_ce), .we_a(m_we), .din_a(m_din), .qout_a(m_qout),
    .addr_b('0), .ce_b(1'b0), .we_b(1'b0), .din_b('0), .qout_b(unused_q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_ce = 0; t_we = 0; t_addr = 0; t_din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < D; i++) begin
      t_ce = 1; t_we = 1; t_addr = AW'(i); t_din = W'($urandom); model[i] = t_din;
      @(negedge clk);
    end
    t_ce = 0; t_we = 0;
    repeat (STAGES + 1) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      t_ce = $urandom % 4 != 0; t_we = $urandom % 2 == 1;
      t_addr = AW'($urandom); t_din = W'($urandom);
      if (due_data.exists(n)) begin
        check(t_qout == due_data[n], "read data after 1 + 2*STAGES cycles");
        due_data.delete(n);
      end
      if (n >= STAGES) begin
        check(m_ce == hist[0].ce && m_we == hist[0].we, "en/we delayed by STAGES");
        if (m_ce) check(m_addr == hist[0].addr && (!m_we || m_din == hist[0].din), "address/data delayed by STAGES");
        void'(hist.pop_front());
      end
      hist.push_back('{addr: t_addr, ce: t_ce, we: t_we, din: t_din});
      if (t_ce && !t_we) begin due_data[n + RL] = model[t_addr]; reads++; end
      if (t_ce && t_we) model[t_addr] = t_din;
      @(negedge clk);
    end
    $display("reads %0d", reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
