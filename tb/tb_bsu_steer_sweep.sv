// tb_bsu_steer_sweep: steering sweep of the Beam Steering Unit while it
// transmits, at default parameters.
//
// The unit sends random 16-PSK symbols at 32000 cycles per symbol
// (8 kbaud at 256 MHz) while the steering vector is stepped through all 256
// vectors B = [0, w, 2w, 3w], w = 0..255, one symbol each. For every symbol
// the testbench measures the delay of each channel from its rising edges,
// converts it to a carrier phase with the phase model of an integer-N PLL
// ((d * 2453) mod 256), and checks that the phases are alpha + beta_c.
//
// It then forms what a receiver broadside to the array would collect from
// four equal carriers with those phases, the normalised power
// |sum_c exp(j*2*pi*phi_c/256)|^2 / 16, and compares it with the same sum
// computed from w alone. The power must be 1 at w = 0 (all in phase) and
// vanish (below -50 dB) at w = 128, a 180 degree step between neighbours.
module tb_bsu_steer_sweep;
  import bsu_pkg::*;

  localparam int unsigned PER = 1 << PTW_W;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_sq = 1'b0;
  logic [PTW_W-1:0] beta [N_CH];
  logic             sv = 1'b0;
  logic [PTW_W-1:0] sd = '0;
  logic             srdy, sunder, stick, lready;
  logic [PTW_W-1:0] ptw [N_CH];
  logic [N_CH-1:0]  ref_o;
  logic             mod_en = 1'b0;

  bsu_top dut (
    .clk(clk), .rst_n(rst_n), .ref_i(ref_sq),
    .host_ptw_i('0), .host_ptw_sel_i('0),
    .mod_en_i(mod_en), .psk_bits_i(4'(PSK_BITS)), .sym_cyc_i(20'(SYM_CYC)), .beta_i(beta),
    .sym_valid_i(sv), .sym_data_i(sd), .sym_ready_o(srdy),
    .sym_underrun_o(sunder), .sym_tick_o(stick),
    .lut_wr_en_i(1'b0), .lut_wr_addr_i('0), .lut_wr_data_i('0),
    .lut_ready_o(lready), .ptw_o(ptw), .ref_o(ref_o));

  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @cyc %0d: %s", cyc, what);
    end
  endtask

  int unsigned cyc = 0;
  int rise [N_CH];
  logic [N_CH-1:0] ref_prev = '0;
  int zero_edge = 0;

  always @(negedge clk) ref_sq = (cyc % PER) < (PER / 2);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < N_CH; c++)
      if (ref_o[c] && !ref_prev[c]) rise[c] <= int'(cyc);
    ref_prev <= ref_o;
  end

  function automatic int delay_of(input int c);
    return ((rise[c] - zero_edge) % int'(PER) + int'(PER)) % int'(PER);
  endfunction

  function automatic real array_power(input int ph [N_CH]);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int c = 0; c < N_CH; c++) begin
      re += $cos(2.0 * PI * real'(ph[c]) / real'(PER));
      im += $sin(2.0 * PI * real'(ph[c]) / real'(PER));
    end
    return (re * re + im * im) / real'(N_CH * N_CH);
  endfunction

  // Symbol monitor (samples at the rising edge).
  logic [PTW_W-1:0] exp_alpha = '0;
  int   cur_w = -1;
  int   w_now = 0;
  bit   have_sym = 1'b0;
  int   last_tick = 0;
  real  power [PER];
  bit   seen [PER];

  always @(posedge clk) begin
    if (stick) begin
      if (have_sym) begin
        int ph [N_CH];
        int expph [N_CH];
        chk(int'(cyc) - last_tick == int'(SYM_CYC), "symbol spacing");
        for (int c = 0; c < N_CH; c++) begin
          ph[c]    = (delay_of(c) * int'(PLL_M)) % int'(PER);
          expph[c] = (int'(exp_alpha) + c * cur_w) % int'(PER);
          chk(ph[c] == expph[c], $sformatf("w=%0d ch%0d phase %0d, expected %0d", cur_w, c, ph[c], expph[c]));
        end
        if (cur_w >= 0) begin
          power[cur_w] = array_power(ph);
          seen[cur_w]  = 1'b1;
          chk((power[cur_w] - array_power(expph)) < 1e-9 && (array_power(expph) - power[cur_w]) < 1e-9,
              $sformatf("w=%0d array power", cur_w));
        end
      end
      chk(sv && srdy, "symbol available");
      exp_alpha = PTW_W'((int'(sd) & ((1 << PSK_BITS) - 1)) << (PTW_W - PSK_BITS));
      cur_w     = w_now;
      have_sym  = 1'b1;
      last_tick = int'(cyc);
    end
  end

  always @(posedge clk) begin
    bit taken;
    taken = sv && srdy;
    #1;
    if (taken || !sv) begin
      sv = mod_en;
      sd = PTW_W'($urandom);
    end
  end

  int n_seen;
  real p_db;

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      beta[c] = '0;
      rise[c] = 0;
    end
    for (int w = 0; w < int'(PER); w++) begin
      seen[w] = 1'b0;
      power[w] = 0.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!lready) @(negedge clk);
    repeat (2 * PER) @(negedge clk);
    zero_edge = rise[0];
    w_now = 0;
    sd = PTW_W'($urandom);
    sv = 1'b1;
    mod_en = 1'b1;
    for (int w = 0; w <= int'(PER); w++) begin
      // wait for a boundary, then set the next steering vector
      @(posedge clk iff stick);
      repeat (10) @(negedge clk);
      if (w < int'(PER)) begin
        for (int c = 0; c < N_CH; c++) beta[c] = PTW_W'(c * w);
        w_now = w;
      end
    end
    @(posedge clk iff stick);
    repeat (2) @(negedge clk);
    n_seen = 0;
    for (int w = 0; w < int'(PER); w++) if (seen[w]) n_seen++;
    chk(n_seen == int'(PER), $sformatf("%0d of 256 steering vectors measured", n_seen));
    chk(power[0] > 0.999999, "full power at w = 0");
    p_db = 10.0 * $log10(power[PER/2] + 1e-30);
    chk(p_db < -50.0, $sformatf("null at 180 degrees: %f dB", p_db));
    $display("normalised power: w=0 %f, w=32 %f, w=64 %f, w=96 %f, w=128 %e",
             power[0], power[32], power[64], power[96], power[128]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
