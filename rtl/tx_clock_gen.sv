// Transmit clock-enable generator.
//
// All baseband IPs run on one clock and advance on clock enables. This block
// divides the baseband clock into a sample enable (every CLK_PER_SAMPLE
// cycles), a chip enable (first sample of each chip, every SAMPLES_PER_CHIP
// samples) and a symbol enable (first chip of each symbol, every
// CHIPS_PER_SYMBOL chips). The three are coincident at a symbol start.
// While en is low all counters sit at zero, so the first enables appear on
// the first cycle en is high.
//
// CLK_PER_SAMPLE = 2 follows the baseband clock being twice the converter
// sample rate; the counter structure itself is this design's choice.
// Option 1/2 uses 4 samples per chip and 15 chips per bit, option 3 uses
// 2 samples per chip (4 per O-QPSK symbol) and 32 chips per symbol.
module tx_clock_gen #(
  parameter int unsigned CLK_PER_SAMPLE   = 2,
  parameter int unsigned SAMPLES_PER_CHIP = 4,
  parameter int unsigned CHIPS_PER_SYMBOL = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic sample_ce,
  output logic chip_ce,
  output logic symbol_ce
);
  localparam int CW = $clog2(CLK_PER_SAMPLE + 1);
  localparam int SW = $clog2(SAMPLES_PER_CHIP + 1);
  localparam int HW = $clog2(CHIPS_PER_SYMBOL + 1);

  logic [CW-1:0] clk_cnt;
  logic [SW-1:0] smp_cnt;
  logic [HW-1:0] chp_cnt;

  always_comb begin
    sample_ce = en && (clk_cnt == '0);
    chip_ce   = sample_ce && (smp_cnt == '0);
    symbol_ce = chip_ce && (chp_cnt == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      clk_cnt <= '0;
      smp_cnt <= '0;
      chp_cnt <= '0;
    end else begin
      clk_cnt <= (clk_cnt == CW'(CLK_PER_SAMPLE - 1)) ? '0 : clk_cnt + 1'b1;
      if (sample_ce) begin
        smp_cnt <= (smp_cnt == SW'(SAMPLES_PER_CHIP - 1)) ? '0 : smp_cnt + 1'b1;
        if (chip_ce)
          chp_cnt <= (chp_cnt == HW'(CHIPS_PER_SYMBOL - 1)) ? '0 : chp_cnt + 1'b1;
      end
    end
  end
endmodule
