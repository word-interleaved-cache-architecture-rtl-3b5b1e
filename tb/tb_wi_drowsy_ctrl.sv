// tb_wi_drowsy_ctrl: periodic drowsy policy with a short window (50 cycles).
// A cycle-accurate model of the policy (window counter, deferred sleep under
// hold, wake of single rows or whole sets, enable) runs beside the block and
// the drowsy vector and sleep pulse are compared every cycle; stimuli are
// random. Also checks that sleeps happen exactly WINDOW cycles apart when
// nothing holds them.
module tb_wi_drowsy_ctrl;
  localparam int SETS = 128, WAYS = 4, WINDOW = 50;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic enable, hold, wake_en;
  logic [6:0] wake_set;
  logic [3:0] wake_ways;
  logic [SETS*WAYS-1:0] drowsy;
  logic sleep_pulse;

  logic [SETS*WAYS-1:0] m_drowsy;
  int   m_cnt;
  bit   m_due;
  int   sleeps, last_sleep, cyc;

  wi_drowsy_ctrl #(.WINDOW(WINDOW)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .hold(hold), .wake_en(wake_en),
    .wake_set(wake_set), .wake_ways(wake_ways), .drowsy(drowsy),
    .sleep_pulse(sleep_pulse));

  always #5 clk = ~clk;

  initial begin
    enable = 0; hold = 0; wake_en = 0; wake_set = 0; wake_ways = 0;
    m_drowsy = '0; m_cnt = 0; m_due = 0; sleeps = 0; last_sleep = -1; cyc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; enable = 1;
    for (int t = 0; t < 4000; t++) begin
      bit exp_pulse;
      // stimulus for this cycle
      enable  = !(t >= 3000 && t < 3100);
      hold    = (t >= 1000 && t < 2000) ? ($urandom_range(0, 3) == 0) : 1'b0;
      wake_en = ($urandom_range(0, 3) == 0);
      wake_set = 7'($urandom_range(0, 3));
      wake_ways = ($urandom_range(0, 4) == 0) ? 4'hF : 4'(1 << $urandom_range(0, 3));
      #1;
      exp_pulse = enable && m_due && !hold;
      checks++;
      if (sleep_pulse !== exp_pulse) begin
        failures++; $display("FAIL pulse t=%0d", t);
      end
      if (sleep_pulse && hold == 0 && t < 1000) begin
        if (last_sleep >= 0 && t - last_sleep != WINDOW) begin
          failures++; $display("FAIL period %0d", t - last_sleep);
        end
        checks++;
        last_sleep = t;
      end
      if (sleep_pulse) sleeps++;
      @(posedge clk);
      // model update at the edge
      if (!enable) begin
        m_cnt = 0; m_due = 0; m_drowsy = '0;
      end else begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (wake_en && int'(wake_set) == s && wake_ways[w]) m_drowsy[s*WAYS+w] = 0;
            else if (exp_pulse) m_drowsy[s*WAYS+w] = 1;
        if (m_cnt == WINDOW - 1) begin m_cnt = 0; m_due = 1; end
        else begin m_cnt++; if (exp_pulse) m_due = 0; end
      end
      #1;
      checks++;
      if (drowsy !== m_drowsy) begin
        failures++;
        if (failures < 10) $display("FAIL drowsy vector t=%0d", t);
      end
    end
    checks++;
    if (sleeps < 40) begin failures++; $display("FAIL only %0d sleeps", sleeps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
