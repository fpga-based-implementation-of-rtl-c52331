// Early-late gate symbol timing recovery.
//
// The real part of each carrier-corrected sample is rectified (|Re y|) and
// passed through two delays, so three consecutive values are at hand:
// early (oldest), on-time and late (newest). A down-counter picks one
// instant out of every period (the down-sampling by K_s); at that instant
// the timing decision unit compares early and late. If early is larger the
// peak lies before the on-time sample, so the next period is one sample
// shorter (ret); if late is larger it is one sample longer (adv); otherwise
// it is SPS samples. The loop thus walks to the peak and then dithers
// around it.
//
// Output: at each instant the sign of the on-time I sample is a chip
// decision. In O-QPSK mode (oqpsk = 1) the Q chip is the sign of the Q
// sample SPS/2 samples later (the half-symbol offset), and the pair leaves
// then; in BPSK mode the I chip leaves at once and chip_q is 0. Decisions
// are 1 bit, 1 for a positive sample. pd_stb_i/pd_stb_q mark the I and Q
// chip instants and pd_i/pd_q hold the on-time sample there, for the
// decision-directed O-QPSK phase detector of the carrier recovery. SPS = 8 samples per I-branch symbol
// is this design's receive rate.
module timing_recovery #(
  parameter int unsigned SPS = 8,
  parameter int unsigned W   = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                ce,
  input  logic                oqpsk,
  input  logic signed [W-1:0] yi,
  input  logic signed [W-1:0] yq,
  output logic                chip_valid,
  output logic                chip_i,
  output logic                chip_q,
  output logic                adv,
  output logic                ret,
  output logic                pd_stb_i,
  output logic                pd_stb_q,
  output logic signed [W-1:0] pd_i,
  output logic signed [W-1:0] pd_q
);
  localparam int CW = $clog2(SPS + 2);

  logic        [W-1:0] mag_l, mag_o, mag_e;   // late, on-time, early
  logic signed [W-1:0] yi_l, yi_o, yq_l, yq_o;
  logic        [CW-1:0] cnt, qcnt;
  logic                 qpend, i_hold;
  logic        [W-1:0]  abs_re;

  assign abs_re = yi[W-1] ? W'(-yi) : W'(yi);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      mag_l <= '0; mag_o <= '0; mag_e <= '0;
      yi_l <= '0; yi_o <= '0; yq_l <= '0; yq_o <= '0;
      cnt <= CW'(SPS - 1);
      qcnt <= '0; qpend <= 1'b0; i_hold <= 1'b0;
      chip_valid <= 1'b0; chip_i <= 1'b0; chip_q <= 1'b0;
      adv <= 1'b0; ret <= 1'b0;
      pd_stb_i <= 1'b0; pd_stb_q <= 1'b0; pd_i <= '0; pd_q <= '0;
    end else begin
      pd_stb_i <= 1'b0;
      pd_stb_q <= 1'b0;
      chip_valid <= 1'b0;
      adv <= 1'b0;
      ret <= 1'b0;
      if (ce) begin
        mag_l <= abs_re;
        mag_o <= mag_l;
        mag_e <= mag_o;
        yi_l  <= yi;
        yi_o  <= yi_l;
        yq_l  <= yq;
        yq_o  <= yq_l;
        if (cnt == '0) begin
          pd_stb_i <= 1'b1;
          pd_i     <= yi_o;
          pd_q     <= yq_o;
          // Decision instant: mag_o / yi_o are the on-time sample.
          if (mag_e > mag_l) begin
            cnt <= CW'(SPS - 2);
            ret <= 1'b1;
          end else if (mag_l > mag_e) begin
            cnt <= CW'(SPS);
            adv <= 1'b1;
          end else begin
            cnt <= CW'(SPS - 1);
          end
          if (oqpsk) begin
            i_hold <= !yi_o[W-1];
            qcnt   <= CW'(SPS / 2 - 1);
            qpend  <= 1'b1;
          end else begin
            chip_valid <= 1'b1;
            chip_i     <= !yi_o[W-1];
            chip_q     <= 1'b0;
          end
        end else begin
          cnt <= cnt - 1'b1;
        end
        if (qpend && cnt != '0) begin
          if (qcnt == '0) begin
            pd_stb_q   <= 1'b1;
            pd_i       <= yi_o;
            pd_q       <= yq_o;
            chip_valid <= 1'b1;
            chip_i     <= i_hold;
            chip_q     <= !yq_o[W-1];
            qpend      <= 1'b0;
          end else begin
            qcnt <= qcnt - 1'b1;
          end
        end
      end
    end
  end
endmodule
