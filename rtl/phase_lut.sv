// phase_lut: look-up table from a wanted PLL output phase to the PTW that
// produces it.
//
// Delaying a PLL reference by d fast-clock periods shifts the reference phase
// by d * 360/2**PTW_W degrees; the integer-N PLL multiplies that by its
// feedback ratio M, so the output phase index is (d * n) mod 2**PTW_W with
// n = M mod 2**PTW_W. The output phases are therefore scrambled, and the
// table undoes it: entry PTR (output phase PTR * 360/2**PTW_W) holds
//     PTW = (PTR * n_hat) mod 2**PTW_W,   where (n_hat * n) mod 2**PTW_W = 1.
// n must be odd for n_hat to exist; with the defaults M = 2453, n = 149 and
// n_hat = 189.
//
// After reset the table fills itself with these theoretical values: a
// counter walks the 2**PTW_W addresses, adding n_hat to a running sum at
// each step, so no multiplier is needed; init_done_o rises when it has
// finished (2**PTW_W cycles). A write port (wr_*) lets firmware replace
// single entries with measured, calibrated PTWs; such writes are ignored
// while the fill runs. The read port is synchronous: rd_data_o is valid one
// cycle after rd_addr_i.
//
// Choices of this design: self-fill after reset rather than a preloaded
// image; one read and one write port.
module phase_lut #(
  parameter int unsigned PTW_W = 8,
  parameter int unsigned PLL_M = 2453
) (
  input  logic             clk,
  input  logic             rst_n,
  // calibration write port
  input  logic             wr_en_i,
  input  logic [PTW_W-1:0] wr_addr_i,
  input  logic [PTW_W-1:0] wr_data_i,
  // read port (one cycle latency)
  input  logic [PTW_W-1:0] rd_addr_i,
  output logic [PTW_W-1:0] rd_data_o,
  output logic             init_done_o
);
  import bsu_pkg::mod_inv_pow2;

  localparam int unsigned DEPTH = 1 << PTW_W;
  localparam int unsigned N_RES = PLL_M % DEPTH;
  localparam logic [PTW_W-1:0] N_HAT = PTW_W'(mod_inv_pow2(N_RES, PTW_W));

  if (PLL_M % 2 == 0) begin : g_bad_m
    $error("phase_lut: PLL_M must be odd so that every output phase is reachable");
  end

  logic [PTW_W-1:0] mem [DEPTH];

  logic             filling;
  logic [PTW_W-1:0] fill_addr;
  logic [PTW_W-1:0] fill_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filling   <= 1'b1;
      fill_addr <= '0;
      fill_val  <= '0;
    end else if (filling) begin
      fill_addr <= fill_addr + 1'b1;
      fill_val  <= fill_val + N_HAT;
      if (fill_addr == PTW_W'(DEPTH - 1)) filling <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (filling)      mem[fill_addr] <= fill_val;
    else if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

  assign init_done_o = !filling;

endmodule
