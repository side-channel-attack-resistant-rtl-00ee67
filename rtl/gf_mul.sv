// gf_mul -- word-parallel GF(2^M) modular multiplier with P lanes.
//
// c = a * b mod f(x), computed the way the document parallelises the
// polynomial multiplication over the cores of a multi-core: A is cut into
// NW = ceil(M/W) words a_0..a_(NW-1); word t is handed to a lane ("core"),
// which returns the reduced partial product P_t = a_t * x^(tW) * b mod f(x);
// the result is the XOR of all P_t. With P lanes the words are issued in
// NR = ceil(NW/P) rounds, round r giving word r*P + k to lane k. A lane with
// no word in a round stays idle (the idle cores the document discusses; no
// low-level dummy work is put on them). A round ends when every lane issued in
// it has finished.
//
// Multiplier adjuster (adj_en = 1): the lane that gets the last word scans
// only LASTB = M - floor(M/W)*W bits instead of W (W when M is a multiple of W),
// which shortens the last round. With adj_en = 0 every word is scanned in full.
//
// Interface: start (one cycle, while idle) samples a, b and adj_en. done
// pulses for one cycle with c valid; c holds until the next start.
// lane_busy shows which lanes are working. Timing, from the edge that samples
// start to the edge after which done is high: sum over rounds of
// (2 + max over that round's lanes of (nbits + t*W + nbits - 1)), see mul_lane.
// Word split, round order and adjuster follow the document; the handshake and
// the exact cycle counts are this design's.
// The assertions at the end are disabled while rst_n is low; because rst_n
// is also the asynchronous reset of the flops, the linter reports it as a
// net used both synchronously and asynchronously. The assertions are
// simulation checks only and add no logic.
module gf_mul #(
  parameter int unsigned      M      = 131,
  parameter int unsigned      W      = 32,
  parameter int unsigned      P      = 4,
  parameter logic [M:0]       F_POLY = (M+1)'(1) << M | (M+1)'('h10D),
  localparam int unsigned     NW     = (M + W - 1) / W,
  localparam int unsigned     NR     = (NW + P - 1) / P,
  localparam int unsigned     IW     = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned     CW     = $clog2(W + 1),
  localparam int unsigned     LASTB  = (M % W == 0) ? W : (M % W),
  localparam int unsigned     RW     = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         adj_en,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c,
  output logic [P-1:0] lane_busy
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e state;

  logic [NW*W-1:0] a_q;       // A, zero padded to whole words
  logic [M-1:0]    b_q;
  logic            adj_q;
  logic [RW-1:0]   round;
  logic [P-1:0]    pend;      // lanes of this round not yet finished
  logic [M-1:0]    acc;       // XOR of the partial products so far

  logic [P-1:0]    l_start, l_done;
  logic [IW-1:0]   l_idx  [P];
  logic [W-1:0]    l_word [P];
  logic [CW-1:0]   l_nb   [P];
  logic [M-1:0]    l_p    [P];
  logic [P-1:0]    l_act;     // lane has a word in this round

  for (genvar k = 0; k < P; k++) begin : g_lane
    int unsigned widx;
    always_comb begin
      widx      = int'(round) * P + k;
      l_act[k]  = (widx < NW);
      l_idx[k]  = IW'(widx);
      l_word[k] = (widx < NW) ? a_q[(widx % NW) * W +: W] : '0;
      l_nb[k]   = (adj_q && widx == NW - 1) ? CW'(LASTB) : CW'(W);
      l_start[k] = (state == S_ISSUE) && l_act[k];
    end

    mul_lane #(.M(M), .W(W), .F_POLY(F_POLY)) u_lane (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (l_start[k]),
      .word_idx (l_idx[k]),
      .a_word   (l_word[k]),
      .nbits    (l_nb[k]),
      .b        (b_q),
      .busy     (lane_busy[k]),
      .done     (l_done[k]),
      .p        (l_p[k])
    );
  end

  logic [M-1:0] acc_x;
  always_comb begin
    acc_x = acc;
    for (int k = 0; k < P; k++)
      if (l_done[k]) acc_x ^= l_p[k];
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      b_q   <= '0;
      adj_q <= 1'b0;
      round <= '0;
      pend  <= '0;
      acc   <= '0;
      c     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= (NW*W)'(a);
          b_q   <= b;
          adj_q <= adj_en;
          round <= '0;
          acc   <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          pend  <= l_act;
          state <= S_WAIT;
        end
        S_WAIT: begin
          acc  <= acc_x;
          pend <= pend & ~l_done;
          if ((pend & ~l_done) == '0) begin
            if (int'(round) == NR - 1) begin
              c     <= acc_x;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              round <= round + 1'b1;
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A lane may only report completion while the multiplier waits for it.
  a_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    (l_done != '0) |-> (state == S_WAIT && (l_done & ~pend) == '0));

endmodule
