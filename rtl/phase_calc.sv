// phase_calc: real-time differential phase between the two receive channels.
//
// The two interferometric channels arrive as complex baseband samples
// V1 = v1_i + j v1_q and V2 = v2_i + j v2_q. Over N_LOOKS sample pairs the
// block accumulates the interferogram  C = sum V1 * conj(V2)
//   Re C = sum (v1_i v2_i + v1_q v2_q),  Im C = sum (v1_q v2_i - v1_i v2_q)
// and the two channel powers P1 = sum |V1|^2, P2 = sum |V2|^2. The phase of
// C is the averaged phase difference of the channels; the magnitude of C
// against sqrt(P1 P2) is their coherence, left to the processor since it is
// only needed for quality checks. The phase is found with a CORDIC
// (cordic_atan2) and a correction `phase_offset` is subtracted from it, which
// is where a temperature-dependent phase error measured by the telemetry is
// taken out. Phases are 16-bit fractions of a half turn: 2^(PHASE_W-1) = pi.
//
// Interface: a sample pair is taken on every cycle with `in_valid`; `clr`
// discards a partly filled average. After every N_LOOKS-th pair the sums are
// published and, ITERS+2 cycles after that pair's clock edge, `phase_valid`
// pulses with `phase` (corrected) and `phase_raw`. Sums stay on the outputs
// until the next average ends. N_LOOKS must exceed ITERS+2 so that the CORDIC
// is free when the next average ends. The number of looks, the sample width
// and the CORDIC are this design's choices; the averaging of V1 conj(V2)
// follows the interferometric phase estimate.
module phase_calc #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned N_LOOKS  = 1024,
  parameter int unsigned PHASE_W  = 16,
  parameter int unsigned ITERS    = 16,
  localparam int unsigned ACC_W   = 2 * SAMPLE_W + 2 + $clog2(N_LOOKS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] v1_i,
  input  logic signed [SAMPLE_W-1:0] v1_q,
  input  logic signed [SAMPLE_W-1:0] v2_i,
  input  logic signed [SAMPLE_W-1:0] v2_q,
  input  logic        [PHASE_W-1:0]  phase_offset,
  output logic signed [ACC_W-1:0]    xc_re,
  output logic signed [ACC_W-1:0]    xc_im,
  output logic        [ACC_W-1:0]    pow1,
  output logic        [ACC_W-1:0]    pow2,
  output logic                       phase_valid,
  output logic signed [PHASE_W-1:0]  phase_raw,
  output logic signed [PHASE_W-1:0]  phase
);

  if (N_LOOKS <= ITERS + 2) begin : g_bad_looks
    $error("phase_calc: N_LOOKS must exceed ITERS+2");
  end

  localparam int unsigned PW = 2 * SAMPLE_W + 1;
  localparam int unsigned LW = $clog2(N_LOOKS);

  logic signed [PW-1:0]    d_re, d_im, d_p1, d_p2;
  logic signed [ACC_W-1:0] a_re, a_im, a_p1, a_p2;
  logic signed [ACC_W-1:0] n_re, n_im, n_p1, n_p2;
  logic        [LW-1:0]    looks;
  logic                    cstart, cdone;
  logic signed [PHASE_W-1:0] cangle;

  always_comb begin
    d_re = PW'(v1_i * v2_i) + PW'(v1_q * v2_q);
    d_im = PW'(v1_q * v2_i) - PW'(v1_i * v2_q);
    d_p1 = PW'(v1_i * v1_i) + PW'(v1_q * v1_q);
    d_p2 = PW'(v2_i * v2_i) + PW'(v2_q * v2_q);
    n_re = a_re + ACC_W'(d_re);
    n_im = a_im + ACC_W'(d_im);
    n_p1 = a_p1 + ACC_W'(d_p1);
    n_p2 = a_p2 + ACC_W'(d_p2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_re  <= '0; a_im <= '0; a_p1 <= '0; a_p2 <= '0;
      xc_re <= '0; xc_im <= '0; pow1 <= '0; pow2 <= '0;
      looks  <= '0;
      cstart <= 1'b0;
    end else begin
      cstart <= 1'b0;
      if (clr) begin
        a_re  <= '0; a_im <= '0; a_p1 <= '0; a_p2 <= '0;
        looks <= '0;
      end else if (in_valid) begin
        if (looks == LW'(N_LOOKS - 1)) begin
          xc_re  <= n_re;
          xc_im  <= n_im;
          pow1   <= n_p1;
          pow2   <= n_p2;
          a_re   <= '0; a_im <= '0; a_p1 <= '0; a_p2 <= '0;
          looks  <= '0;
          cstart <= 1'b1;
        end else begin
          a_re  <= n_re;
          a_im  <= n_im;
          a_p1  <= n_p1;
          a_p2  <= n_p2;
          looks <= looks + 1'b1;
        end
      end
    end
  end

  cordic_atan2 #(.IN_W(ACC_W), .OUT_W(PHASE_W), .ITERS(ITERS)) u_cordic (
    .clk, .rst_n,
    .start (cstart),
    .x_in  (xc_re),
    .y_in  (xc_im),
    .busy  (),
    .done  (cdone),
    .angle (cangle)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_valid <= 1'b0;
      phase_raw   <= '0;
      phase       <= '0;
    end else begin
      phase_valid <= cdone;
      if (cdone) begin
        phase_raw <= cangle;
        phase     <= cangle - PHASE_W'(phase_offset);
      end
    end
  end

endmodule
