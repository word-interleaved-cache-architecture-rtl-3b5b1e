// wi_drowsy_ctrl: drowsy-mode control of the WI data ways.
//
// Leakage is cut by lowering the supply of rows that are not in use. The unit
// of control is one row of one data way (in the WI cache: word i of all lines
// of a set). Policy: every WINDOW cycles all rows are put into drowsy mode at
// once; a row is woken when an access needs it. Waking takes effect at the
// next clock edge, so an access to a drowsy row costs one extra cycle. A read
// or word write needs only one row of the set (the way chosen by the offset);
// a line write-back or refill needs the rows of all ways.
//
// hold defers the periodic sleep while an access is in flight, so a row woken
// for an access cannot fall asleep before the access is done; the sleep is
// then taken in the first cycle without hold. A row being woken in the cycle
// of the sleep stays awake. With enable low every row is awake and the window
// counter is cleared. drowsy[s*WAYS+w] is the mode of row s of way w, for the
// supply-voltage control of the array. Synchronous active-low reset: all
// rows awake.
module wi_drowsy_ctrl #(
  parameter int unsigned SETS   = 128,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned WINDOW = 2000,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned CNT_W = $clog2(WINDOW + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 hold,
  input  logic                 wake_en,
  input  logic [IDX_W-1:0]     wake_set,
  input  logic [WAYS-1:0]      wake_ways,
  output logic [SETS*WAYS-1:0] drowsy,
  output logic                 sleep_pulse   // all rows sent to drowsy mode
);

  logic [CNT_W-1:0] cnt_q;
  logic             due_q;

  always_comb sleep_pulse = enable && due_q && !hold;

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      cnt_q <= '0;
      due_q <= 1'b0;
    end else begin
      if (cnt_q == CNT_W'(WINDOW - 1)) begin
        cnt_q <= '0;
        due_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
        if (sleep_pulse) due_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      drowsy <= '0;
    end else begin
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (wake_en && wake_set == s[IDX_W-1:0] && wake_ways[w])
            drowsy[s*WAYS+w] <= 1'b0;
          else if (sleep_pulse)
            drowsy[s*WAYS+w] <= 1'b1;
        end
    end
  end

endmodule
