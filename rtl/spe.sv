// spe: stochastic processing engine for one region of interest. It
// convolves an R x R region with a K x K kernel in the stochastic domain.
//
// Every cycle of a pass the converter pulse trains are sampled on the
// system clock (giving one bit per pixel) together with the positive and
// negative weight streams. For each output pixel the K x K window of sampled
// pixel bits is ANDed with the weight bits (the stochastic multiplications);
// the products of positive taps and of negative taps are counted into two
// separate accumulators, and a binary subtractor gives pos - neg. This
// AND-array, split-accumulator and subtractor structure and the sampling of
// the pulse trains follow the design. The window is zero padded at the
// region edge so the output is R x R; padding and accumulator widths are
// this implementation's choices.
//
// Interface and timing: pulse a cycle with clear (the ramp-reset cycle),
// then hold en for the 2^n cycles of the pass, with last on the final one.
// Inputs are sampled at each clock edge and accumulated one cycle later, so
// result_valid pulses two cycles after the cycle carrying last; result then
// holds the signed pos - neg counts until the next clear. A pass of N-bit
// streams therefore takes N + 3 cycles from clear to result_valid.
module spe
  import adc_fist_pkg::*;
#(
  parameter int unsigned R     = REG_SIZE,
  parameter int unsigned K     = KSIZE,
  parameter int unsigned NMAX  = NMAX_LOG2,
  parameter int unsigned ACC_W = $clog2(K * K * (1 << NMAX) + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic                    last,
  input  logic                    pix_pulse [R*R],
  input  logic                    w_pos     [K*K],
  input  logic                    w_neg     [K*K],
  output logic signed [ACC_W:0]   result    [R*R],
  output logic                    result_valid
);

  localparam int HALF = K / 2;

  // Sampling stage.
  logic pix_q [R*R];
  logic wp_q  [K*K];
  logic wn_q  [K*K];
  logic en_q, last_q, clr_q;

  always_ff @(posedge clk) begin
    pix_q <= pix_pulse;
    wp_q  <= w_pos;
    wn_q  <= w_neg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q         <= 1'b0;
      last_q       <= 1'b0;
      clr_q        <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      en_q         <= en;
      last_q       <= en && last;
      clr_q        <= clear;
      result_valid <= last_q;
    end
  end

  // AND array and split accumulators.
  logic [ACC_W-1:0] acc_pos [R*R];
  logic [ACC_W-1:0] acc_neg [R*R];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < R * R; p++) begin
        acc_pos[p] <= '0;
        acc_neg[p] <= '0;
      end
    end else if (clr_q) begin
      for (int p = 0; p < R * R; p++) begin
        acc_pos[p] <= '0;
        acc_neg[p] <= '0;
      end
    end else if (en_q) begin
      for (int y = 0; y < int'(R); y++) begin
        for (int x = 0; x < int'(R); x++) begin
          logic [ACC_W-1:0] n_pos, n_neg;
          n_pos = '0;
          n_neg = '0;
          for (int ky = 0; ky < int'(K); ky++) begin
            for (int kx = 0; kx < int'(K); kx++) begin
              int sy, sx;
              sy = y + ky - HALF;
              sx = x + kx - HALF;
              if (sy >= 0 && sy < int'(R) && sx >= 0 && sx < int'(R)) begin
                n_pos += ACC_W'(pix_q[sy*R+sx] & wp_q[ky*K+kx]);
                n_neg += ACC_W'(pix_q[sy*R+sx] & wn_q[ky*K+kx]);
              end
            end
          end
          acc_pos[y*R+x] <= acc_pos[y*R+x] + n_pos;
          acc_neg[y*R+x] <= acc_neg[y*R+x] + n_neg;
        end
      end
    end
  end

  // Binary subtractor.
  always_comb begin
    for (int p = 0; p < R * R; p++)
      result[p] = $signed({1'b0, acc_pos[p]}) - $signed({1'b0, acc_neg[p]});
  end

endmodule
