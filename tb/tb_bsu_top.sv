// tb_bsu_top: end-to-end test of the Beam Steering Unit at its default size.
//
// The top runs with all parameters at their defaults: 4 channels, 8-bit
// phase words, PLL ratio M = 2453, 256 fast-clock cycles per 1 MHz
// reference period. The PLLs are represented by their phase behaviour only:
// an integer-N PLL locked to a reference delayed by d fast-clock cycles puts
// out phase index (d * M) mod 256 (units of 360/256 degrees). The testbench
// measures d for every channel from the rising edges of the delayed
// references and applies that model.
//
// Sequence and checks:
//   1. reset; the LUT fills itself in 256 cycles; the edge position of an
//      undelayed reference is recorded as the zero of all delay measurements;
//   2. direct mode: channel 1 is swept over all 256 PTWs against channel 0
//      at PTW 0 and the measured delay difference must equal the PTW;
//   3. modulator mode, 16-PSK, 32000 cycles per symbol (8 kbaud at 256 MHz,
//      so 32 kbit/s): random symbols under steering vectors
//      B = [0, w, 2w, 3w]; for every symbol each channel's PLL phase must be
//      alpha + beta_c and the relative phases must equal B whatever alpha;
//      the symbol spacing must be 32000 cycles;
//   4. an underrun keeps the last phases; a calibrated LUT entry replaces the
//      theoretical PTW; BPSK and 256-PSK; back to direct mode.
// Every mechanism (LUT fill, direct write, symbol update, steering change,
// underrun, calibration entry used, XOR half-period stage used, constellation
// change, mode switch) is counted and must happen at least once.
module tb_bsu_top;
  import bsu_pkg::*;

  localparam int unsigned PER = 1 << PTW_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_sq = 1'b0;
  logic [PTW_W-1:0] host_ptw = '0;
  logic [N_CH-1:0]  host_sel = '0;
  logic             mod_en = 1'b0;
  logic [3:0]       psk = 4'(PSK_BITS);
  logic [19:0]      scyc = 20'(SYM_CYC);
  logic [PTW_W-1:0] beta [N_CH];
  logic             sv = 1'b0;
  logic [PTW_W-1:0] sd = '0;
  logic             srdy, sunder, stick;
  logic             lwe = 1'b0;
  logic [PTW_W-1:0] lwa = '0, lwd = '0;
  logic             lready;
  logic [PTW_W-1:0] ptw [N_CH];
  logic [N_CH-1:0]  ref_o;

  bsu_top dut (
    .clk(clk), .rst_n(rst_n), .ref_i(ref_sq),
    .host_ptw_i(host_ptw), .host_ptw_sel_i(host_sel),
    .mod_en_i(mod_en), .psk_bits_i(psk), .sym_cyc_i(scyc), .beta_i(beta),
    .sym_valid_i(sv), .sym_data_i(sd), .sym_ready_o(srdy),
    .sym_underrun_o(sunder), .sym_tick_o(stick),
    .lut_wr_en_i(lwe), .lut_wr_addr_i(lwa), .lut_wr_data_i(lwd),
    .lut_ready_o(lready), .ptw_o(ptw), .ref_o(ref_o));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fill = 0, n_direct = 0, n_sym = 0, n_steer = 0, n_under = 0;
  int n_cal = 0, n_xor = 0, n_psk = 0, n_mode = 0;

  always #2 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @cyc %0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference and edge measurement ----------------
  int unsigned cyc = 0;
  int          rise [N_CH];
  logic [N_CH-1:0] ref_prev = '0;
  int          zero_edge = 0;

  always @(negedge clk) ref_sq = (cyc % PER) < (PER / 2);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < N_CH; c++)
      if (ref_o[c] && !ref_prev[c]) rise[c] <= int'(cyc);
    ref_prev <= ref_o;
    for (int c = 0; c < N_CH; c++) if (ptw[c][PTW_W-1]) n_xor++;
  end

  // Delay of channel c, in fast-clock cycles, from its last rising edge.
  function automatic int delay_of(input int c);
    return ((rise[c] - zero_edge) % int'(PER) + int'(PER)) % int'(PER);
  endfunction
  // Phase-domain model of an integer-N PLL: output phase index.
  function automatic int pll_phase(input int d);
    return (d * int'(PLL_M)) % int'(PER);
  endfunction

  // ---------------- symbol-level monitor ----------------
  logic [PTW_W-1:0] exp_alpha = '0;
  logic [PTW_W-1:0] cur_beta [N_CH];
  logic [PTW_W-1:0] cal_ptr = '0, cal_ptw = '0;
  bit   cal_active = 1'b0;
  bit   have_sym = 1'b0;
  int   last_tick = 0;
  int   sym_checked = 0;

  function automatic int eff_p(input logic [3:0] p);
    return (p == 0 || p > PTW_W) ? int'(PTW_W) : int'(p);
  endfunction

  // Checks the phases held during the symbol that is just ending.
  task automatic check_symbol_phases();
    int ph [N_CH];
    for (int c = 0; c < N_CH; c++) begin
      logic [PTW_W-1:0] ptr;
      ptr = exp_alpha + cur_beta[c];
      ph[c] = pll_phase(delay_of(c));
      if (cal_active && ptr == cal_ptr) begin
        chk(delay_of(c) == int'(cal_ptw),
            $sformatf("ch%0d calibrated PTR %0d: delay %0d, expected %0d", c, ptr, delay_of(c), cal_ptw));
        n_cal++;
      end else begin
        chk(ph[c] == int'(ptr),
            $sformatf("ch%0d PLL phase %0d, expected alpha %0d + beta %0d", c, ph[c], exp_alpha, cur_beta[c]));
      end
    end
    if (!cal_active)
      for (int c = 1; c < N_CH; c++)
        chk(((ph[c] - ph[0] + int'(PER)) % int'(PER)) == int'(PTW_W'(cur_beta[c] - cur_beta[0])),
            $sformatf("beam: ch%0d relative phase", c));
    sym_checked++;
  endtask

  // Samples at the rising edge, i.e. the values the design acts on.
  always @(posedge clk) begin
    if (stick) begin
      if (have_sym) begin
        chk(int'(cyc) - last_tick == int'(scyc),
            $sformatf("symbol spacing %0d, expected %0d", int'(cyc) - last_tick, scyc));
        check_symbol_phases();
      end
      if (sv) begin
        chk(srdy, "symbol accepted");
        exp_alpha = PTW_W'((int'(sd) & ((1 << eff_p(psk)) - 1)) << (PTW_W - eff_p(psk)));
        n_sym++;
      end else begin
        chk(sunder, "underrun flagged");
        n_under++;
      end
      for (int c = 0; c < N_CH; c++) cur_beta[c] = beta[c];
      have_sym  = 1'b1;
      last_tick = int'(cyc);
    end
  end

  // Symbol source: keeps a symbol waiting while 'feed' is set; random unless
  // fixed_sym selects one.
  bit feed = 1'b1;
  int fixed_sym = -1;
  always @(posedge clk) begin
    bit taken;
    taken = sv && srdy;              // handshake at this edge
    #1;
    if (taken || !sv) begin
      sv = feed && mod_en;
      sd = (fixed_sym >= 0) ? PTW_W'(fixed_sym) : PTW_W'($urandom);
    end
  end

  task automatic wait_symbols(input int n);
    int s;
    s = n_sym + n_under;
    while (n_sym + n_under < s + n) @(negedge clk);
  endtask

  task automatic host_write(input logic [N_CH-1:0] sel, input logic [PTW_W-1:0] v);
    @(negedge clk);
    host_ptw = v;
    host_sel = sel;
    @(negedge clk);
    host_sel = '0;
    n_direct++;
  endtask

  // Steering vector [0, w, 2w, 3w], changed a few cycles after a boundary.
  task automatic steer(input int w);
    repeat (10) @(negedge clk);
    for (int c = 0; c < N_CH; c++) beta[c] = PTW_W'(c * w);
    n_steer++;
  endtask

  int fill_cycles = 0;

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      beta[c] = '0;
      cur_beta[c] = '0;
      rise[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 1. LUT self-fill and delay zero.
    while (!lready) begin
      @(negedge clk);
      fill_cycles++;
    end
    chk(fill_cycles == int'(PER), $sformatf("LUT fill %0d cycles", fill_cycles));
    n_fill++;
    repeat (2 * PER) @(negedge clk);
    zero_edge = rise[0];
    for (int c = 1; c < N_CH; c++) chk(rise[c] == rise[0], "equal edges at PTW 0");

    // 2. Direct mode: sweep channel 1 against channel 0.
    for (int p = 0; p < int'(PER); p++) begin
      host_write(4'b0010, PTW_W'(p));
      repeat (2 * PER) @(negedge clk);
      chk(delay_of(1) == p && delay_of(0) == 0,
          $sformatf("direct PTW %0d: measured delay %0d", p, delay_of(1)));
    end

    // 3. Modulator, 16-PSK at 32000 cycles per symbol.
    psk = 4'(PSK_BITS);
    scyc = 20'(SYM_CYC);
    beta[1] = 8'd10; beta[2] = 8'd20; beta[3] = 8'd30;
    @(negedge clk);
    mod_en = 1'b1;
    n_mode++;
    wait_symbols(4);
    for (int w = 64; w < 256; w += 48) begin
      steer(w);
      wait_symbols(3);
    end

    // 4a. Underrun: phases must hold.
    feed = 1'b0;
    wait_symbols(2);
    feed = 1'b1;
    wait_symbols(2);

    // 4b. Shorter symbols for the remaining cases (still > 3 reference periods).
    scyc = 20'd1024;
    wait_symbols(2);
    psk = 4'd1;   n_psk++;
    wait_symbols(4);
    psk = 4'd8;   n_psk++;
    wait_symbols(8);

    // 4c. Calibration: make PTR 0 use a different PTW, then send symbol 0
    // with zero steering so every channel uses it.
    steer(0);
    psk = 4'd4;   n_psk++;
    wait_symbols(1);
    cal_ptr = 8'd0;
    cal_ptw = 8'd77;
    @(negedge clk);
    mod_en = 1'b0;    // hold the registers while the LUT is rewritten
    have_sym = 1'b0;
    n_mode++;
    lwe = 1'b1; lwa = cal_ptr; lwd = cal_ptw;
    @(negedge clk);
    lwe = 1'b0;
    cal_active = 1'b1;
    fixed_sym = 0;
    @(negedge clk);
    mod_en = 1'b1;
    n_mode++;
    wait_symbols(4);
    fixed_sym = -1;
    wait_symbols(1);                 // last symbol 0 checked here
    // Restore the theoretical entry (0 * n_hat = 0).
    @(negedge clk);
    mod_en = 1'b0;
    have_sym = 1'b0;
    n_mode++;
    lwe = 1'b1; lwa = cal_ptr; lwd = 8'd0;
    @(negedge clk);
    lwe = 1'b0;
    cal_active = 1'b0;

    // 4d. Direct mode again.
    host_write(4'b1111, 8'd200);
    repeat (2 * PER) @(negedge clk);
    for (int c = 0; c < N_CH; c++) chk(delay_of(c) == 200, $sformatf("direct ch%0d after modulation", c));

    $display("symbols=%0d checked=%0d underruns=%0d steering=%0d direct=%0d cal_uses=%0d xor_cycles=%0d psk_changes=%0d mode_switches=%0d",
             n_sym, sym_checked, n_under, n_steer, n_direct, n_cal, n_xor, n_psk, n_mode);
    chk(n_fill  > 0, "LUT fill happened");
    chk(n_direct > 0, "direct write happened");
    chk(n_sym   > 0, "symbol update happened");
    chk(n_steer > 0, "steering change happened");
    chk(n_under > 0, "underrun happened");
    chk(n_cal   > 0, "calibrated entry used");
    chk(n_xor   > 0, "XOR stage used");
    chk(n_psk   > 0, "constellation change happened");
    chk(n_mode  > 0, "mode switch happened");
    // 32000 cycles per 4-bit symbol at 256 MHz is 8 kbaud, 32 kbit/s.
    chk((256_000_000 / SYM_CYC) * PSK_BITS == 32_000, "data rate 32 kbit/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
