// bodd_calc: odd-power table unit. For NE field elements x_e it computes the
// odd powers x_e, x_e^3, ..., x_e^(2T-1).
//
// In the EHe decoder this is the B_odd matrix calculation unit: the entries
// are the 2t locators of the least reliable bits and row e of the result is
// row e of B_odd (transposed with respect to the document's equation). The
// effective syndrome unit reuses it with the p extra locators, whose odd
// powers are the odd incremental syndromes.
//
// The powers come from a chain of T-1 power-sum units: stage s computes
// x^(2s+1) = x^(2s-1) * x^2, i.e. a power sum with A = x^(2s-1), B = x and
// C = 0. The elements are streamed into the chain one per cycle after
// `start`, each carrying its index as a tag, so the unit finishes NE +
// (T-1)*ceil(M/Q) + 1 cycles after `start`, then pulses `done`. The result
// registers hold until the next `start`. The document uses power-sum units
// for this step; the single shared chain is this design's choice.
module bodd_calc #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int T    = bch_pkg::BCH_T,
  parameter int NE   = 2 * bch_pkg::BCH_T
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] x   [NE],
  output logic [M-1:0] pw  [NE][T],
  output logic         done
);
  localparam int IW = (NE > 1) ? $clog2(NE) : 1;
  localparam int TW = IW + 1;   // index plus "last element" flag

  logic          feeding;
  logic [IW-1:0] feed_idx;
  logic [M-1:0]  feed_x;

  assign feed_x = x[feed_idx];

  // Chain of T-1 power-sum units; the tag carries the index and all powers
  // found so far.
  localparam int CW = TW + T * M;
  logic          cv [T];
  logic [CW-1:0] ct [T];

  assign cv[0] = feeding;
  assign ct[0] = {feed_idx == IW'(NE - 1), feed_idx, {(T-1)*M{1'b0}}, feed_x};

  for (genvar s = 1; s < T; s++) begin : g_chain
    logic [M-1:0] prod;
    logic [CW-1:0] tg;
    logic          v;
    gf_power_sum #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(CW)) u_ps (
      .clk, .rst,
      .in_valid (cv[s-1]),
      .a        (ct[s-1][(s-1)*M +: M]),
      .b        (ct[s-1][M-1:0]),
      .c        ('0),
      .tag_in   (ct[s-1]),
      .out_valid(v),
      .p        (prod),
      .tag_out  (tg)
    );
    assign cv[s] = v;
    always_comb begin
      ct[s] = tg;
      ct[s][s*M +: M] = prod;
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      feeding  <= 1'b0;
      feed_idx <= '0;
    end else if (start) begin
      feeding  <= 1'b1;
      feed_idx <= '0;
    end else if (feeding) begin
      if (feed_idx == IW'(NE - 1)) feeding <= 1'b0;
      else                         feed_idx <= feed_idx + 1'b1;
    end
    if (!rst && cv[T-1]) begin
      for (int j = 0; j < T; j++)
        pw[ct[T-1][T*M +: IW]][j] <= ct[T-1][j*M +: M];
      if (ct[T-1][CW-1]) done <= 1'b1;
    end
  end
endmodule
