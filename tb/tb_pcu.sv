// tb_pcu: self-checking test of the Phase Control Unit.
//
// A 50 % duty reference of 256 fast-clock cycles feeds the four delay lines.
// The test writes PTWs through the shared bus, sometimes to several
// channels at once, lets the lines settle for one reference period and then
// checks, cycle by cycle over a full period, that every output equals the
// reference PTW_c + 1 cycles earlier. It also checks the register read-back
// and measures, from rising edges, the delay of each channel relative to
// channel 0, the quantity the PLLs turn into a phase difference.
module tb_pcu;
  localparam int unsigned NC  = 4;
  localparam int unsigned W   = 8;
  localparam int unsigned PER = 1 << W;
  localparam int unsigned HL  = 2 * PER;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_sq = 1'b0;
  logic [W-1:0]  wdata = '0;
  logic [NC-1:0] we = '0;
  logic [W-1:0]  ptw [NC];
  logic [NC-1:0] ref_o;
  logic [W-1:0]  model [NC];
  logic hist [HL];
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  int last_rise [NC];
  logic [NC-1:0] ref_prev = '0;

  always #5 clk = ~clk;

  pcu #(.N_CH(NC), .PTW_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .ref_i(ref_sq), .ptw_wdata_i(wdata),
    .ptw_we_i(we), .ptw_o(ptw), .ref_o(ref_o));

  always @(negedge clk) ref_sq = (cyc % PER) < (PER / 2);
  always @(posedge clk) begin
    hist[cyc % HL] <= ref_sq;
    cyc <= cyc + 1;
    for (int c = 0; c < NC; c++)
      if (ref_o[c] && !ref_prev[c]) last_rise[c] <= int'(cyc);
    ref_prev <= ref_o;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic write(input logic [NC-1:0] sel, input logic [W-1:0] v);
    @(negedge clk);
    wdata = v;
    we    = sel;
    @(negedge clk);
    we    = '0;
    for (int c = 0; c < NC; c++) if (sel[c]) model[c] = v;
  endtask

  task automatic settle_and_check();
    repeat (PER) @(negedge clk);
    for (int c = 0; c < NC; c++) chk(ptw[c] == model[c], $sformatf("ch%0d register", c));
    for (int i = 0; i < PER; i++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++)
        chk(ref_o[c] == hist[(cyc + HL - 1 - model[c]) % HL],
            $sformatf("ch%0d ptw %0d cycle %0d", c, model[c], cyc));
    end
    // Relative delay from the rising edges seen during the last period.
    for (int c = 1; c < NC; c++)
      chk(((last_rise[c] - last_rise[0] + 2 * PER) % PER) == (int'(model[c]) - int'(model[0]) + PER) % PER,
          $sformatf("ch%0d edge delay vs ch0", c));
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      model[c] = '0;
      last_rise[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (PER) @(negedge clk);
    settle_and_check();
    // Steering vectors [0, w, 2w, 3w], written one channel at a time.
    for (int w = 1; w < 256; w += 23) begin
      for (int c = 0; c < NC; c++) write(NC'(1 << c), W'(c * w));
      settle_and_check();
    end
    // Shared writes to several channels, then random ones.
    write(4'b1111, 8'd200);
    write(4'b0101, 8'd17);
    settle_and_check();
    for (int i = 0; i < 20; i++) begin
      write(NC'($urandom), W'($urandom));
      settle_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
