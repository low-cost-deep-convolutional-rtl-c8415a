// sc_compute_tile: tile-parallel array of bit-parallel SC-MACs with shared
// stochastic number generators (the compute tile of the doubly hybrid design).
//
// A convolution layer is tiled along output maps (TM), output rows (TR) and
// output columns (TC). In one step the tile multiplies TM weights w[m] (one
// per output map, shared by all pixels) with TR*TC input pixels x[r][c] (one
// per output pixel, shared by all maps) and accumulates
// y[m][r][c] += w[m] * x[r][c] in all TM*TR*TC MACs. Operands are binary; each
// is turned into N bipolar stream bits per clock by comparators against N
// LFSRs that the whole tile shares (x against the state, w against its bit
// reversal), so the tile needs TM + TR*TC comparator sets instead of two SNGs
// per MAC. Each MAC XNORs its two streams and feeds apc_pc_acc (approximate
// parallel counter and saturating accumulator). Accumulation is binary, so a
// step's operands may change every clock: a step of L stream bits takes L/N
// clocks with en high, and the accumulators hold the sum over all steps.
//
// Interface: w[TM], x[TR*TC] (Q-bit two's complement, bipolar values in
// [-1, 1)) are sampled each clock with en; clr zeroes the accumulators and
// restarts the LFSRs; y[m*TR*TC + r*TC + c] holds the Q+A-bit sums, in units
// of one stream bit (x*w*L after L bits). sat ORs the MACs' saturation flags.
//
// The tiling (TM x TR x TC MACs, weight shared over the TR*TC pixels), the
// LFSR-based SNGs shared across the array, 128-bit approximate parallelism,
// 16-bit data and the 2 extra accumulator bits follow the document; the
// operand ports, the LFSR seeds and the bit-reversal sharing are this
// design's own.
module sc_compute_tile #(
  parameter int unsigned TM     = 4,
  parameter int unsigned TR     = 4,
  parameter int unsigned TC     = 4,
  parameter int unsigned N      = 128,
  parameter int unsigned Q      = 16,
  parameter int unsigned A      = 2,
  parameter bit          APPROX = 1'b1,
  localparam int unsigned NP    = TR * TC,
  localparam int unsigned ACC_W = Q + A
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,   // zero all accumulators, restart the LFSRs
  input  logic                    en,    // consume N stream bits in every MAC
  input  logic [TM-1:0][Q-1:0]    w,     // one bipolar weight per output map
  input  logic [NP-1:0][Q-1:0]    x,     // one bipolar activation per output pixel
  output logic signed [ACC_W-1:0] y [TM*NP],  // accumulators, index m*NP + pixel
  output logic                    sat    // some MAC saturated this clock
);

  logic [N-1:0][Q-1:0] rnd;
  logic [N-1:0][Q-1:0] rrev;
  logic [NP-1:0][N-1:0] xs;     // stream bits of every input pixel
  logic [TM-1:0][N-1:0] ws;     // stream bits of every weight
  logic [TM*NP-1:0]     msat;
  logic                 lfsr_rst_n;

  assign lfsr_rst_n = rst_n && !clr;

  // the shared random number generators (their comparators are unused)
  for (genvar i = 0; i < N; i++) begin : g_rng
    logic ua, ub;
    lfsr_sng #(.Q(Q), .SEED(16'(1 + 37 * i))) u_rng (
      .clk(clk), .rst_n(lfsr_rst_n), .en(en), .value_a('0), .value_b('0),
      .bit_a(ua), .bit_b(ub), .rnd(rnd[i])
    );
  end

  // one comparator set per operand: (r - 1) < offset-binary value
  always_comb begin
    for (int i = 0; i < int'(N); i++)
      for (int k = 0; k < int'(Q); k++) rrev[i][k] = rnd[i][Q-1-k];
    for (int p = 0; p < int'(NP); p++)
      for (int i = 0; i < int'(N); i++)
        xs[p][i] = (rnd[i] - 1'b1) < {~x[p][Q-1], x[p][Q-2:0]};
    for (int m = 0; m < int'(TM); m++)
      for (int i = 0; i < int'(N); i++)
        ws[m][i] = (rrev[i] - 1'b1) < {~w[m][Q-1], w[m][Q-2:0]};
  end

  for (genvar m = 0; m < TM; m++) begin : g_m
    for (genvar p = 0; p < NP; p++) begin : g_p
      apc_pc_acc #(.N(N), .ACC_W(ACC_W), .APPROX(APPROX)) u_mac (
        .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .pb(~(ws[m] ^ xs[p])),
        .acc(y[m*NP+p]), .sat(msat[m*NP+p])
      );
    end
  end

  assign sat = |msat;

endmodule
