// dpwm - digital pulse-width modulator for the full-bridge switches.
//
// A free-running counter counts 0 .. period-1. While the count is below
// duty_cmp the diagonal pair Q1+Q3 is on (+V_in on the bridge), otherwise Q2+Q4
// (-V_in): bipolar modulation, whose mean bridge voltage is (2D-1) V_in with
// D = duty_cmp/period. The counter advances on each clock with en high; the
// switch outputs are registered. period and duty_cmp are sampled when the
// counter wraps, so a change takes effect at the next switching period.
// start pulses for one enabled cycle at the beginning of each period.
// Synchronous reset restarts the counter with all switches off.
// The source design only states that a simple DPWM drives the model; the
// counter structure and bipolar pattern are this design's choice, the latter
// matching the output-voltage relation v_O = (2D-1) V_in.
module dpwm #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [CNT_W-1:0] period,
  input  logic [CNT_W-1:0] duty_cmp,
  output fb_pkg::sw_t      sw,
  output logic             start
);
  logic [CNT_W-1:0] cnt, per_q, cmp_q;
  logic             wrap;

  localparam fb_pkg::sw_t SW_POS = '{q1: 1'b1, q3: 1'b1, default: 1'b0};
  localparam fb_pkg::sw_t SW_NEG = '{q2: 1'b1, q4: 1'b1, default: 1'b0};

  always_comb wrap = (cnt >= per_q - 1'b1) || (per_q == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      per_q <= '0;
      cmp_q <= '0;
      sw    <= '0;
      start <= 1'b0;
    end else if (en) begin
      start <= wrap;
      if (wrap) begin
        cnt   <= '0;
        per_q <= period;
        cmp_q <= duty_cmp;
        sw    <= (duty_cmp != '0) ? SW_POS : SW_NEG;
      end else begin
        cnt   <= cnt + 1'b1;
        sw    <= (cnt + 1'b1 < cmp_q) ? SW_POS : SW_NEG;
      end
    end
  end
endmodule
