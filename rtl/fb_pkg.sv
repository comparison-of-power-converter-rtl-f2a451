// fb_pkg - shared number formats and types of the full-bridge HIL plant model.
//
// The model is written in signed fixed point. A QX.Y signal has X integer
// bits, Y fractional bits and one sign bit (X+Y+1 bits in total); its value is
// the stored integer times 2^-Y. The formats of V_in, i_R, v_C/v_O, i_L, i_L*,
// v_L, i_C, dt/L and dt/C are those of the optimized fixed-point model (OFPM):
// every multiplier operand is cut to 18 bits on one side and 25 bits on the
// other so that each product fits one 18x25 DSP multiplier. The formats of
// G_L, V_D and the resistances are not fixed by the source design beyond being
// 18-bit multiplier constants; the Q formats chosen for them here are this
// design's own.
package fb_pkg;

  // ---- Signal formats (width, fractional bits) -------------------------
  localparam int VIN_W  = 11;  localparam int VIN_F  = 2;   // V_in   Q8.2
  localparam int VC_W   = 40;  localparam int VC_F   = 30;  // v_C,v_O Q9.30
  localparam int IL_W   = 40;  localparam int IL_F   = 33;  // i_L    Q6.33
  localparam int ILS_W  = 25;  localparam int ILS_F  = 18;  // i_L*,i_C Q6.18
  localparam int VL_W   = 25;  localparam int VL_F   = 15;  // v_L, v_O* Q9.15
  localparam int IR_W   = 30;  localparam int IR_F   = 23;  // i_R    Q6.23
  localparam int K_W    = 18;                               // constants
  localparam int DTL_F  = 32;                               // dt/L   Q-15.32
  localparam int DTC_F  = 29;                               // dt/C   Q-12.29
  localparam int GL_F   = 17;                               // G_L    Q0.17
  localparam int R_F    = 13;                               // R_x    Q4.13
  localparam int VD_F   = 15;                               // V_D    Q2.15

  // ---- DSP multiplier geometry -----------------------------------------
  localparam int MUL_A_W = 18;
  localparam int MUL_B_W = 25;
  localparam int MUL_P_W = MUL_A_W + MUL_B_W;

  typedef logic signed [VIN_W-1:0] vin_t;
  typedef logic signed [VC_W-1:0]  vc_t;
  typedef logic signed [IL_W-1:0]  il_t;
  typedef logic signed [ILS_W-1:0] ils_t;
  typedef logic signed [VL_W-1:0]  vl_t;
  typedef logic signed [IR_W-1:0]  ir_t;
  typedef logic signed [K_W-1:0]   k_t;

  // Switch control inputs. Leg A: Q1 high side, Q4 low side.
  // Leg B: Q2 high side, Q3 low side. Q1+Q3 apply +V_in, Q2+Q4 apply -V_in.
  typedef struct packed {
    logic q1;
    logic q2;
    logic q3;
    logic q4;
  } sw_t;

  // Parasitic parameters of the non-ideal converter (all set to 0 for the
  // ideal converter).
  typedef struct packed {
    k_t rdson;  // MOSFET on resistance, Q4.13 ohm
    k_t rd;     // diode series resistance, Q4.13 ohm
    k_t rl;     // inductor series resistance, Q4.13 ohm
    k_t resr;   // capacitor ESR, Q4.13 ohm
    k_t vd;     // diode forward voltage, Q2.15 V
  } loss_t;

  // Conduction situation: which devices carry the inductor current.
  typedef enum logic [1:0] {
    SIT_I   = 2'd0,  // two MOSFETs
    SIT_III = 2'd1,  // one MOSFET and one diode
    SIT_II  = 2'd2   // two diodes (all switches off)
  } situation_e;

endpackage
