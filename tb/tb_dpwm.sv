// tb_dpwm - self-checking test of the DPWM.
//
// For several period / compare settings (including the 20 kHz, D = 0.75
// setting at a 16 ns clock: 3125 cycles, compare 2344), counts over whole
// periods the cycles with Q1+Q3 on and with Q2+Q4 on, checks that one
// diagonal pair is always on and never both legs shorted, that start pulses
// exactly once per period at the expected spacing, and that a new setting
// takes effect only at the next period boundary. en low freezes the counter.
module tb_dpwm;
  import fb_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [15:0] period, duty_cmp;
  sw_t sw; logic start;
  int checks = 0, failures = 0;

  dpwm #(.CNT_W(16)) dut (.clk, .rst, .en, .period, .duty_cmp, .sw, .start);

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count one period that begins at a start pulse
  task automatic measure(input int exp_per, input int exp_on);
    int per, on, off;
    per = 0; on = 0; off = 0;
    do begin
      if (en) begin
        per++;
        if (sw == 4'b1010) on++;
        else if (sw == 4'b0101) off++;
        else begin failures++; $display("FAIL illegal pattern %b", sw); end
      end
      @(posedge clk); #1;
    end while (!(start && en));
    checks++;
    if (per != exp_per || on != exp_on || off != exp_per - exp_on) begin
      failures++;
      $display("FAIL period=%0d/%0d on=%0d/%0d off=%0d", per, exp_per, on, exp_on, off);
    end
  endtask

  int pers [4] = '{3125, 100, 17, 1000};
  int cmps [4] = '{2344, 0, 17, 250};

  initial begin
    period = 16'd3125; duty_cmp = 16'd2344;
    repeat (2) @(posedge clk);
    #1 rst = 0; en = 1;
    // wait for the first start pulse (settings loaded)
    do begin @(posedge clk); #1; end while (!start);
    for (int k = 0; k < 4; k++) begin
      // setting for the period after the current one
      period = 16'(pers[(k + 1) % 4]); duty_cmp = 16'(cmps[(k + 1) % 4]);
      measure(pers[k], cmps[k]);
      measure(pers[(k + 1) % 4], cmps[(k + 1) % 4]);
    end
    // en low: counter and outputs hold
    period = 16'd1000; duty_cmp = 16'd500;
    measure(3125, 2344);
    measure(1000, 500);
    begin
      sw_t held;
      repeat (10) @(posedge clk);
      #1 en = 0; held = sw;
      repeat (50) @(posedge clk);
      #1;
      checks++;
      if (sw != held || start) begin failures++; $display("FAIL hold"); end
      en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
