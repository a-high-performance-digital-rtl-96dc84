// fp_mul: IEEE-754 single-precision multiplier, two pipeline stages.
//
// Each processor of the control card has one of these attached as a hardware
// floating-point multiplier. Stage 1 registers the operands' signs, the sum of
// the exponents and the 48-bit product of the 24-bit significands. Stage 2
// normalises, rounds to nearest with ties to even, and handles the special
// cases: NaN in or infinity times zero gives the quiet NaN 0x7FC00000;
// infinity gives infinity; results too large give infinity; results below the
// normal range, and subnormal inputs, give a signed zero (flush to zero).
//
// Interface: start with dataa/datab; done is high two cycles later with the
// result, in the style of a processor custom-instruction port. A new operation
// may start every cycle. The pipeline depth, the flush-to-zero handling and
// the NaN value are this design's choices.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic        done,
  output logic [31:0] result
);

  typedef enum logic [1:0] {K_NUM, K_ZERO, K_INF, K_NAN} kind_e;

  // ---- stage 1 ----
  logic        v1, s1;
  kind_e       k1;
  logic [9:0]  e1;      // biased exponent sum - 127, signed 10 bit
  logic [47:0] p1;


  function automatic kind_e kind_of(input logic [30:0] x);
    if (x[30:23] == 8'hFF) return (x[22:0] != 0) ? K_NAN : K_INF;
    if (x[30:23] == 8'h00) return K_ZERO;   // zero and subnormals
    return K_NUM;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; s1 <= 1'b0; k1 <= K_ZERO; e1 <= '0; p1 <= '0;
    end else begin
      kind_e ka, kb;
      ka = kind_of(dataa[30:0]);
      kb = kind_of(datab[30:0]);
      v1 <= start;
      s1 <= dataa[31] ^ datab[31];
      if (ka == K_NAN || kb == K_NAN ||
          (ka == K_INF && kb == K_ZERO) || (ka == K_ZERO && kb == K_INF))
        k1 <= K_NAN;
      else if (ka == K_INF || kb == K_INF)
        k1 <= K_INF;
      else if (ka == K_ZERO || kb == K_ZERO)
        k1 <= K_ZERO;
      else
        k1 <= K_NUM;
      e1 <= {2'b00, dataa[30:23]} + {2'b00, datab[30:23]} - 10'd127;
      p1 <= {1'b1, dataa[22:0]} * {1'b1, datab[22:0]};
    end
  end

  // ---- stage 2: normalise and round ----
  logic [31:0] res2;
  always_comb begin
    logic [23:0] mant;
    logic        guard, sticky, round_up;
    logic [24:0] mant_r;
    logic [9:0]  e;
    if (p1[47]) begin
      mant   = p1[47:24];
      guard  = p1[23];
      sticky = |p1[22:0];
      e      = e1 + 10'd1;
    end else begin
      mant   = p1[46:23];
      guard  = p1[22];
      sticky = |p1[21:0];
      e      = e1;
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 10'd1;
    end
    unique case (k1)
      K_NAN:  res2 = 32'h7FC0_0000;
      K_INF:  res2 = {s1, 8'hFF, 23'd0};
      K_ZERO: res2 = {s1, 31'd0};
      default: begin
        if (e[9] || e == 10'd0)        res2 = {s1, 31'd0};          // underflow
        else if (e >= 10'd255)         res2 = {s1, 8'hFF, 23'd0};   // overflow
        else                           res2 = {s1, e[7:0], mant_r[22:0]};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= v1;
      if (v1) result <= res2;
    end
  end

endmodule
