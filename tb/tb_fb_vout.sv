// tb_fb_vout - self-checking test of the output-voltage / VRESR unit.
//
// Drives random v_C, i_C and R_ESR with random enable. Checks that
// v_O = v_C + R_ESR * i_C of the last enabled cycle (one-cycle delay of the
// ESR drop), computed in real arithmetic, and that the LOSSES = 0 instance
// gives v_O = v_C.
module tb_fb_vout;
  import fb_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  k_t resr; ils_t ic; vc_t vc, vo, vresr, vo_id, vresr_id;
  longint m_resr;
  int checks = 0, failures = 0;

  fb_vout #(.LOSSES(1'b1)) dut    (.clk, .rst, .en, .resr, .ic, .vc, .vo(vo), .vresr(vresr));
  fb_vout #(.LOSSES(1'b0)) dut_id (.clk, .rst, .en, .resr, .ic, .vc, .vo(vo_id), .vresr(vresr_id));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    resr = '0; ic = '0; vc = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_resr = 0;
    for (int n = 0; n < 10000; n++) begin
      resr = (n % 2) ? k_t'(2949) : k_t'($urandom_range(0, 2**17 - 1));
      ic   = ils_t'($urandom);
      vc   = vc_t'({$urandom, $urandom});
      en   = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (longint'(vo) != longint'(vc_t'(longint'(vc) + m_resr)) || vo_id != vc) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d vo=%0d vc=%0d resr_term=%0d", n, vo, vc, m_resr);
      end
      @(posedge clk);
      if (en) m_resr = longint'($floor(real'(resr) * real'(ic) / 2.0));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
