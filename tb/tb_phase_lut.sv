// tb_phase_lut: self-checking test of the output-phase-to-PTW table.
//
// Two instances: the prototype's (8 bits, M = 2453) and a 6-bit one with
// M = 2451. The test measures the self-fill time (2**W cycles from reset),
// then reads every entry and checks the physical meaning of the table: a
// reference delayed by the PTW read at address PTR gives, after
// multiplication by M in the PLL, output phase index PTR, i.e.
// (PTW * M) mod 2**W == PTR. It also checks the entry against PTR * n_hat,
// with n_hat found here by exhaustive search. Then it checks that
// calibration writes are ignored during the fill and take effect after it.
module tb_phase_lut;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------- 8-bit instance ----------------
  logic       we8 = 1'b0;
  logic [7:0] wa8 = '0, wd8 = '0, ra8 = '0, rd8;
  logic       done8;
  phase_lut #(.PTW_W(8), .PLL_M(2453)) dut8 (
    .clk(clk), .rst_n(rst_n), .wr_en_i(we8), .wr_addr_i(wa8), .wr_data_i(wd8),
    .rd_addr_i(ra8), .rd_data_o(rd8), .init_done_o(done8));

  // ---------------- 6-bit instance ----------------
  logic       we6 = 1'b0;
  logic [5:0] wa6 = '0, wd6 = '0, ra6 = '0, rd6;
  logic       done6;
  phase_lut #(.PTW_W(6), .PLL_M(2451)) dut6 (
    .clk(clk), .rst_n(rst_n), .wr_en_i(we6), .wr_addr_i(wa6), .wr_data_i(wd6),
    .rd_addr_i(ra6), .rd_data_o(rd6), .init_done_o(done6));

  function automatic int inv_search(input int n, input int mod);
    for (int x = 0; x < mod; x++) if ((x * n) % mod == 1) return x;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int fill_cycles;
  int nh8, nh6;
  logic [7:0] cal_val;
  logic [7:0] model8 [256];

  initial begin
    nh8 = inv_search(2453 % 256, 256);
    nh6 = inv_search(2451 % 64, 64);
    chk(nh8 == 189, "n_hat for M=2453 is 189");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Try to overwrite entry 5 while the table fills: must be ignored.
    we8 = 1'b1; wa8 = 8'd5; wd8 = 8'hEE;
    @(negedge clk);
    we8 = 1'b0;
    fill_cycles = 1;
    while (!done8) begin
      chk(!done6 || fill_cycles >= 64, "6-bit fill not early");
      @(negedge clk);
      fill_cycles++;
    end
    chk(fill_cycles == 256, $sformatf("fill took %0d cycles, expected 256", fill_cycles));
    chk(done6, "6-bit table filled");

    // Read back every entry.
    for (int a = 0; a < 256; a++) begin
      ra8 = 8'(a);
      ra6 = 6'(a);
      @(negedge clk);
      chk(((int'(rd8) * 2453) % 256) == a, $sformatf("8b PTR %0d -> PTW %0d not inverse", a, rd8));
      chk(int'(rd8) == (a * nh8) % 256, $sformatf("8b PTR %0d -> PTW %0d vs n_hat", a, rd8));
      if (a < 64) begin
        chk(((int'(rd6) * 2451) % 64) == a, $sformatf("6b PTR %0d -> PTW %0d", a, rd6));
        chk(int'(rd6) == (a * nh6) % 64, $sformatf("6b PTR %0d vs n_hat", a));
      end
    end

    // Calibration: overwrite random entries, then read the whole table back
    // against a model holding the theoretical values plus the overwrites.
    for (int a = 0; a < 256; a++) model8[a] = 8'((a * nh8) % 256);
    for (int i = 0; i < 32; i++) begin
      int a;
      a = $urandom_range(0, 255);
      cal_val = 8'($urandom);
      model8[a] = cal_val;
      we8 = 1'b1; wa8 = 8'(a); wd8 = cal_val;
      @(negedge clk);
      we8 = 1'b0;
    end
    for (int a = 0; a < 256; a++) begin
      ra8 = 8'(a);
      @(negedge clk);
      chk(rd8 == model8[a], $sformatf("after calibration entry %0d = %0d, expected %0d", a, rd8, model8[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
