// mul_lane -- one word lane ("core") of the parallel GF(2^M) multiplier.
//
// Computes the reduced partial product  P_t = (a_t * x^(t*W) * B) mod f(x)
// for one W-bit word a_t of the multiplier A. This is the work one core does
// in the document's word-parallel polynomial multiplication: a bit-serial
// shift-and-XOR scan of the word (one bit of a_t per clock, B shifted by one
// position per clock), followed by a bit-serial long-division reduction by
// f(x) that clears one bit of the double-length product per clock, from the
// highest bit the partial product can occupy down to bit M.
//
// Multiplier adjuster: the number of bits scanned is an input (nbits). The
// parent sets it to W for every word except the last one of the field, which
// gets only the bits the field really has (M mod W). Fewer scanned bits also
// lower the highest possible degree of the partial product, so the reduction
// is shorter as well.
//
// Interface: start (one cycle) samples word_idx, a_word, nbits and b.
// done pulses for one cycle when p holds the result; p stays valid until the
// next start. Timing: done is seen high nbits + max(0, word_idx*W + nbits - 1)
// clock edges after the edge that sampled start, i.e. latency
// nbits + red_steps cycles, with red_steps = word_idx*W + nbits - 1.
// The double-length registers are NW*W + M - 1 bits wide, the degree a full
// W-bit scan of the last word could reach; without the adjuster those extra
// (always zero) bits are scanned by the reduction too.
// Between operations the lane holds all its registers (an idle core).
// The scan and division follow the document's mul_sub(); doing them one bit
// per clock and the exact latency are this design's choices.
module mul_lane #(
  parameter int unsigned      M      = 131,
  parameter int unsigned      W      = 32,
  parameter logic [M:0]       F_POLY = (M+1)'(1) << M | (M+1)'('h10D),
  localparam int unsigned     NW     = (M + W - 1) / W,
  localparam int unsigned     IW     = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned     CW     = $clog2(W + 1),
  localparam int unsigned     DW     = NW * W + M - 1,
  localparam int unsigned     PW     = $clog2(DW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] word_idx,
  input  logic [W-1:0]  a_word,
  input  logic [CW-1:0] nbits,
  input  logic [M-1:0]  b,
  output logic          busy,
  output logic          done,
  output logic [M-1:0]  p
);

  typedef enum logic [1:0] {S_IDLE, S_MULT, S_RED} state_e;
  state_e state;

  logic [DW-1:0] acc;        // partial product being built / reduced
  logic [DW-1:0] bsh;        // B * x^(t*W + j)
  logic [DW-1:0] fsh;        // f(x) * x^(pos - M)
  logic [W-1:0]  aw;         // remaining bits of a_t
  logic [CW-1:0] cnt;        // bits still to scan
  logic [15:0]   pos;        // bit being cleared by the reduction

  // Highest degree the partial product can reach for this word.
  logic [15:0] top_deg;
  assign top_deg = 16'(word_idx) * 16'(W) + 16'(nbits) + 16'(M) - 16'd2;

  logic [DW-1:0] acc_x;      // acc after this clock's conditional XOR
  always_comb begin
    acc_x = acc;
    if (state == S_MULT && aw[0]) acc_x = acc ^ bsh;
    if (state == S_RED  && acc[pos[PW-1:0]]) acc_x = acc ^ fsh;
  end

  assign busy = (state != S_IDLE);
  assign p    = acc[M-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      acc   <= '0;
      bsh   <= '0;
      fsh   <= '0;
      aw    <= '0;
      cnt   <= '0;
      pos   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          acc   <= '0;
          bsh   <= DW'(b) << (int'(word_idx) * W);
          aw    <= a_word;
          cnt   <= nbits;
          pos   <= top_deg;
          fsh   <= DW'(F_POLY) << (top_deg - 16'(M));
          state <= S_MULT;
        end
        S_MULT: begin
          acc <= acc_x;
          aw  <= aw >> 1;
          bsh <= bsh << 1;
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            if (pos < 16'(M)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RED;
            end
          end
        end
        S_RED: begin
          acc <= acc_x;
          fsh <= fsh >> 1;
          pos <= pos - 1'b1;
          if (pos == 16'(M)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
