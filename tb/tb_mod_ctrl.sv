// tb_mod_ctrl: self-checking test of the PSK / steering controller.
//
// The phase LUT is replaced by a registered model holding an arbitrary
// permutation, f(a) = (37 a + 11) mod 256, so that a wrong address shows up
// as a wrong PTW. A monitor follows every clock cycle and checks:
//   - no symbol boundary while the controller is disabled or the LUT is not
//     ready, and the first boundary at most N_CH + 1 cycles after enable
//     (it waits for an update still being written to finish);
//   - the spacing of symbol boundaries equals the programmed cycles per
//     symbol (with the floor of N_CH + 2);
//   - at each boundary a waiting symbol is taken (ready pulse) or an
//     underrun is flagged and the previous rotation kept;
//   - channel c is written exactly c + 2 cycles after the boundary, with
//     f((alpha + beta[c]) mod 256) where alpha = m * 2**(8 - p) for the
//     symbol m of a 2**p-PSK constellation; no other write happens.
module tb_mod_ctrl;
  localparam int unsigned NC = 4;
  localparam int unsigned W  = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          en = 1'b0;
  logic [3:0]    psk = 4'd4;
  logic [19:0]   scyc = 20'd12;
  logic [W-1:0]  beta [NC];
  logic          sv = 1'b0;
  logic [W-1:0]  sd = '0;
  logic          srdy, sunder, stick;
  logic          lready = 1'b0;
  logic [W-1:0]  laddr, ldata;
  logic [W-1:0]  wdata;
  logic [NC-1:0] we;

  int checks = 0, failures = 0;
  int n_ticks = 0, n_under = 0, n_syms = 0;

  always #5 clk = ~clk;

  mod_ctrl #(.N_CH(NC), .PTW_W(W), .CYC_W(20)) dut (
    .clk(clk), .rst_n(rst_n), .enable_i(en), .psk_bits_i(psk), .sym_cyc_i(scyc),
    .beta_i(beta), .sym_valid_i(sv), .sym_data_i(sd), .sym_ready_o(srdy),
    .underrun_o(sunder), .sym_tick_o(stick), .lut_ready_i(lready),
    .lut_addr_o(laddr), .lut_data_i(ldata), .ptw_wdata_o(wdata), .ptw_we_o(we));

  function automatic logic [W-1:0] f(input logic [W-1:0] a);
    return W'((37 * int'(a) + 11) % 256);
  endfunction

  always_ff @(posedge clk) ldata <= f(laddr);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------- monitor ----------------
  int          cyc = 0;
  int          last_tick = -1000;
  logic [W-1:0] exp_alpha = '0;
  bit          en_prev = 1'b0;
  bit          first = 1'b1;
  int          en_cyc = 0;

  function automatic int eff_p(input logic [3:0] p);
    return (p == 0 || p > W) ? W : int'(p);
  endfunction

  always @(negedge clk) begin
    int off, per;
    logic active;
    active = en && lready && rst_n;
    per = (int'(scyc) < NC + 2) ? NC + 2 : int'(scyc);
    if (!active) chk(!stick && !srdy && !sunder, "no boundary while idle");
    if (active && !en_prev) begin
      first  = 1'b1;
      en_cyc = cyc;
    end
    if (stick) begin
      n_ticks++;
      if (!first) chk(cyc - last_tick == per,
                       $sformatf("symbol spacing %0d, expected %0d", cyc - last_tick, per));
      else         chk(cyc - en_cyc <= NC + 1,
                       $sformatf("first boundary %0d cycles after enable", cyc - en_cyc));
      if (sv) begin
        chk(srdy && !sunder, "symbol taken");
        exp_alpha = W'((int'(sd) & ((1 << eff_p(psk)) - 1)) << (W - eff_p(psk)));
        n_syms++;
      end else begin
        chk(!srdy && sunder, "underrun flagged");
        n_under++;
      end
      last_tick = cyc;
    end else if (active && !first) begin
      chk(cyc - last_tick < per, "boundary not missed");
    end
    off = cyc - last_tick;
    if (off >= 2 && off < 2 + NC) begin
      chk(we == NC'(1 << (off - 2)), $sformatf("write enable %b at offset %0d", we, off));
      chk(wdata == f(exp_alpha + beta[off - 2]),
          $sformatf("ch%0d PTW %0d, expected %0d", off - 2, wdata, f(exp_alpha + beta[off - 2])));
    end else begin
      chk(we == '0, "no stray write");
    end
    if (stick) first = 1'b0;
    en_prev = active;
    cyc++;
  end

  // ---------------- stimulus ----------------
  // Keeps a symbol waiting (when 'feed' is set) and replaces it once taken.
  bit feed = 1'b1;
  always @(posedge clk) begin
    bit taken;
    taken = sv && srdy;              // handshake at this edge
    #1;
    if (taken || !sv) begin
      sv = feed;
      sd = W'($urandom);
    end
  end

  task automatic run_symbols(input int n);
    int start;
    start = n_ticks;
    while (n_ticks < start + n) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) beta[c] = W'(c * 40);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;                       // enabled but LUT not ready: no boundary
    repeat (20) @(negedge clk);
    chk(n_ticks == 0, "waits for the LUT");
    lready = 1'b1;
    run_symbols(20);                 // 16-PSK
    // Steering change between boundaries: eq. B = [0, w, 2w, 3w].
    for (int w = 0; w < 256; w += 37) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) beta[c] = W'(c * w);
      run_symbols(2);
    end
    // Underruns.
    feed = 1'b0;
    run_symbols(5);
    feed = 1'b1;
    run_symbols(4);
    // Other constellations, including out-of-range p (read as 8).
    foreach (psk_list[i]) begin
      @(negedge clk);
      psk = psk_list[i];
      run_symbols(6);
    end
    // Change of symbol length, including one below the floor.
    en = 1'b0;
    @(negedge clk);
    scyc = 20'd3;
    en = 1'b1;
    run_symbols(5);
    en = 1'b0;
    @(negedge clk);
    scyc = 20'd31;
    en = 1'b1;
    run_symbols(5);
    repeat (10) @(negedge clk);
    chk(n_under >= 4, "underruns seen");
    chk(n_syms >= 50, "symbols sent");
    $display("symbols=%0d underruns=%0d boundaries=%0d", n_syms, n_under, n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] psk_list [6] = '{4'd1, 4'd2, 4'd3, 4'd8, 4'd0, 4'd12};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
