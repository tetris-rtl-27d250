// tb_net_clock: self-checking testbench for net_clock at its default
// divider (500: a 100 kHz link clock from 50 MHz). The master's clock
// output goes through a delay of a few system clocks to a slave. Checks:
// the master clock has a 500-cycle period and 50 % duty cycle and falls at
// the master's transmit tick; tick_tx and tick_rx each come once per
// period, half a period apart; the slave locks to the master so that its
// ticks keep a fixed distance from the master's ticks, and recovers when
// it starts out of phase.
module tb_net_clock;
  localparam int DIV = 500, DLY = 7;
  logic clk = 0, rst_n = 0, rst_s_n = 0;
  logic m_clk, m_tx, m_rx, s_tx, s_rx, s_clk_unused;
  logic [DLY-1:0] pipe = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint m_tx_t[$], m_rx_t[$], s_tx_t[$], m_fall[$], m_rise[$];
  logic m_clk_d = 0;

  net_clock #(.DIV(DIV), .IS_MASTER(1'b1)) master (.clk, .rst_n, .clk_in(1'b0), .clk_out(m_clk),
                                                   .tick_tx(m_tx), .tick_rx(m_rx));
  net_clock #(.DIV(DIV), .IS_MASTER(1'b0)) slave (.clk, .rst_n(rst_s_n), .clk_in(pipe[DLY-1]), .clk_out(s_clk_unused),
                                                  .tick_tx(s_tx), .tick_rx(s_rx));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // start the slave out of phase with the master
    repeat (137) @(posedge clk);
    rst_s_n = 1;
    repeat (20 * DIV) begin
      @(posedge clk);
      #1;
      cyc++;
      pipe = {pipe[DLY-2:0], m_clk};
      if (m_tx) m_tx_t.push_back(cyc);
      if (m_rx) m_rx_t.push_back(cyc);
      if (s_tx) s_tx_t.push_back(cyc);
      if (!m_clk && m_clk_d) m_fall.push_back(cyc);
      if (m_clk && !m_clk_d) m_rise.push_back(cyc);
      m_clk_d = m_clk;
    end
    check(m_fall[5] - m_fall[4] == DIV, "master clock period");
    check(m_fall[5] - m_rise[5] == DIV / 2 || m_fall[5] - m_rise[4] == DIV / 2, "50 % duty cycle");
    check(m_tx_t[5] - m_tx_t[4] == DIV, "one tx tick per period");
    check(m_rx_t[5] - m_tx_t[5] == DIV / 2 || m_tx_t[5] - m_rx_t[5] == DIV / 2, "rx tick half a period away");
    begin
      longint d1, d2, df;
      df = m_tx_t[6] - m_fall[6];
      if (df < 0) df = -df;
      check(df <= 1, $sformatf("master clock falls at its tx tick (%0d)", df));
      d1 = s_tx_t[$-1] - m_tx_t[$-1];
      d2 = s_tx_t[$-5] - m_tx_t[$-5];
      check(d1 == d2, "slave locked to the master");
      check(d1 >= -DIV / 4 && d1 <= DIV / 4, $sformatf("slave tick within a quarter bit of the master (%0d)", d1));
      $display("slave tick offset %0d system clocks", d1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
