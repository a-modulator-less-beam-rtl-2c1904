// tb_ptw_regs: self-checking test of the PTW tuning registers.
//
// Random data is written with random enable patterns (none, one or several
// channels at once) and each register is compared every cycle with a model
// kept by the testbench. Reset must clear every register to 0.
module tb_ptw_regs;
  localparam int unsigned NC = 4;
  localparam int unsigned W  = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0]  wdata = '0;
  logic [NC-1:0] we = '0;
  logic [W-1:0]  ptw [NC];
  logic [W-1:0]  model [NC];
  int checks = 0, failures = 0;
  int multi = 0;

  always #5 clk = ~clk;

  ptw_regs #(.N_CH(NC), .PTW_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .wdata_i(wdata), .we_i(we), .ptw_o(ptw));

  task automatic compare();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (ptw[c] !== model[c]) begin
        failures++;
        if (failures < 10) $display("FAIL ch%0d got %0d exp %0d", c, ptw[c], model[c]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) model[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 2000; i++) begin
      wdata = W'($urandom);
      we    = NC'($urandom);
      if ($countones(we) > 1) multi++;
      @(posedge clk);
      for (int c = 0; c < NC; c++) if (we[c]) model[c] = wdata;
      @(negedge clk);
      compare();
    end
    // Asynchronous reset clears everything.
    rst_n = 1'b0;
    #1;
    for (int c = 0; c < NC; c++) model[c] = '0;
    compare();
    checks++;
    if (multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
