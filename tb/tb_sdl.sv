// tb_sdl: self-checking test of the synchronous delay line.
//
// Two instances run side by side. dut_x is the default line (XOR in place of
// the longest block) fed with a 50 % duty square wave of period 2**W clock
// cycles, the only input it is specified for. dut_f has a real shift
// register in every block and is fed with random bits, so every delay block
// is seen to delay any data pattern. For every PTW 0 .. 2**W-1 the test
// compares each output, cycle by cycle, with the input as it was PTW+1
// cycles earlier, taken from a history buffer kept by the testbench, once
// one reference period has passed since the PTW change (the line's settling
// time).
module tb_sdl;
  localparam int unsigned W   = 8;
  localparam int unsigned PER = 1 << W;
  localparam int unsigned HL  = 2 * PER;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [W-1:0] ptw = '0;
  logic ref_sq, ref_rnd, out_x, out_f;
  int unsigned cyc = 0;
  logic hist_sq  [HL];
  logic hist_rnd [HL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdl #(.PTW_W(W), .USE_XOR_MSB(1'b1)) dut_x (
    .clk(clk), .rst_n(rst_n), .ptw_i(ptw), .ref_i(ref_sq), .ref_o(out_x));
  sdl #(.PTW_W(W), .USE_XOR_MSB(1'b0)) dut_f (
    .clk(clk), .rst_n(rst_n), .ptw_i(ptw), .ref_i(ref_rnd), .ref_o(out_f));

  // Stimulus changes on the falling edge; history records, per rising edge,
  // what the DUT samples there.
  always @(negedge clk) begin
    ref_sq  = (cyc % PER) < (PER / 2);
    ref_rnd = 1'($urandom);
  end
  always @(posedge clk) begin
    hist_sq[cyc % HL]  <= ref_sq;
    hist_rnd[cyc % HL] <= ref_rnd;
    cyc <= cyc + 1;
  end

  task automatic check_window(input int unsigned n);
    for (int unsigned i = 0; i < n; i++) begin
      @(negedge clk);
      // The last rising edge was number cyc-1; the output flip-flop then
      // took the input sampled ptw edges earlier, one cycle behind it.
      begin
        int unsigned src;
        src = (cyc + HL - 1 - ptw) % HL;
        checks++;
        if (out_x !== hist_sq[src]) begin
          failures++;
          if (failures < 10) $display("FAIL xor ptw=%0d cyc=%0d out=%b exp=%b", ptw, cyc, out_x, hist_sq[src]);
        end
        checks++;
        if (out_f !== hist_rnd[src]) begin
          failures++;
          if (failures < 10) $display("FAIL full ptw=%0d cyc=%0d out=%b exp=%b", ptw, cyc, out_f, hist_rnd[src]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Fill the history and the shift registers with real data first.
    repeat (HL) @(posedge clk);
    for (int p = 0; p < PER; p++) begin
      @(negedge clk);
      ptw = W'(p);
      // Let the downstream shift registers refill with the new setting.
      repeat (PER) @(negedge clk);
      check_window(PER + 8);
    end
    // A few random PTWs in random order.
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      ptw = W'($urandom);
      repeat (PER) @(negedge clk);
      check_window(PER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
