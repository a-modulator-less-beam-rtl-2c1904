// sdl: synchronous delay line with a programmable length.
//
// The reference square wave ref_i is delayed by a whole number of fast-clock
// periods, set by the Phase Tuning Word ptw_i. The line is a cascade of
// PTW_W delay blocks. Block k holds a shift register of 2**k flip-flops and a
// 2:1 multiplexer that, steered by bit k of the PTW, forwards either the
// block's input (bit clear) or the shift register's output (bit set). The
// blocks are ordered from the longest to the shortest, as in the classic
// synchronous delay-line drawing (4 flip-flops, then 2, then 1).
//
// The longest block would only ever add half a reference period, i.e. a
// 180 degree shift. With USE_XOR_MSB set (the default) it is replaced by an
// XOR gate used as a controlled inverter, which saves 2**(PTW_W-1)
// flip-flops. This is exact only for a reference with 50 % duty cycle and a
// period of 2**PTW_W clock cycles (T_CLK = T_REF / 2**PTW_W), which is how the
// line is meant to be used.
//
// A final pipeline flip-flop retimes the line output so that every channel
// leaves through a flip-flop.
//
// Timing: ref_o(t) = ref_i(t - ptw_i - 1) (with the MSB acting as a 180
// degree inversion when USE_XOR_MSB = 1). A PTW change acts at once on the
// multiplexers, but the shorter blocks downstream still hold data that went
// through the old setting of the longer blocks upstream, so the output
// settles to the new delay within 2**PTW_W - 1 cycles (one reference period)
// of the change. The PLL sees this as a short phase step transient.
//
// Choices of this design: active-low asynchronous reset clearing every
// flip-flop; bit set = delay block inserted.
module sdl #(
  parameter int unsigned PTW_W       = 8,
  parameter bit          USE_XOR_MSB = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PTW_W-1:0] ptw_i,
  input  logic             ref_i,
  output logic             ref_o
);

  // chain[k+1] is the input of delay block k, chain[0] its last output.
  logic [PTW_W:0] chain;

  generate
    if (USE_XOR_MSB) begin : g_xor_msb
      assign chain[PTW_W] = ref_i;
      // Controlled inverter in place of the 2**(PTW_W-1) flip-flop block.
      assign chain[PTW_W-1] = chain[PTW_W] ^ ptw_i[PTW_W-1];
    end else begin : g_full_msb
      assign chain[PTW_W] = ref_i;
    end

    for (genvar k = PTW_W - 1; k >= 0; k--) begin : g_blk
      if (!(USE_XOR_MSB && k == PTW_W - 1)) begin : g_sr
        localparam int unsigned LEN = 1 << k;
        logic [LEN-1:0] sr;
        if (LEN == 1) begin : g_one
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) sr <= '0;
            else        sr <= chain[k+1];
          end
        end else begin : g_many
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) sr <= '0;
            else        sr <= {sr[LEN-2:0], chain[k+1]};
          end
        end
        assign chain[k] = ptw_i[k] ? sr[LEN-1] : chain[k+1];
      end
    end
  endgenerate

  // Output pipeline flip-flop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_o <= 1'b0;
    else        ref_o <= chain[0];
  end

endmodule
