// dct_1d: 8-point 1-D DCT/IDCT unit with a five-stage pipeline.
//
// Stage 1, serial to parallel: samples arrive one per cycle (in_valid) and
//   are gathered eight at a time; the mode (in_idct) of the first sample of
//   each group of eight applies to the whole group.
// Stage 2, pre-processor (dct_preproc): butterfly operands, registered.
// Stage 3, multiplier-adder (dct_muladd): four multipliers and three adders
//   produce one m(k) per cycle, k = 0..7, over eight cycles, rounded to
//   ACC_W bits. In DCT mode m(4) and m(0) use two multipliers each,
//   C2(0)*d2' -/+ C2(0)*s2', which is the reduced-adder form of the design.
// Stage 4, post-processor (dct_postproc), registered.
// Stage 5, parallel to serial: eight outputs, one per cycle, each rounded
//   (true rounding, halves away from zero) from ACC_FRAC to OUT_FRAC fractional bits and limited
//   to OUT_W bits.
// Throughput is one sample per cycle, so rows can stream back to back.
// Latency from the first sample of a row to the first output is 18 cycles.
// COL selects the coefficient set: 0 = row-wise (13-bit), 1 = column-wise
// (12-bit). The algorithm, the adder/multiplier counts and the word lengths
// follow the design; the fractional-bit split of each word is this design's
// choice.
module dct_1d
  import tex_pkg::*;
#(
  parameter int IN_W     = 12,
  parameter int IN_FRAC  = 0,
  parameter bit COL      = 1'b0,
  parameter int CF_W     = 13,
  parameter int CF_FRAC  = 13,
  parameter int ACC_W    = 21,
  parameter int ACC_FRAC = 8,
  parameter int OUT_W    = 16,
  parameter int OUT_FRAC = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_idct,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic                    out_idct,
  output logic signed [OUT_W-1:0] out_data
);
  localparam int OP_W  = IN_W + 3;
  localparam int SHIFT = CF_FRAC + IN_FRAC - ACC_FRAC;
  localparam int RSH   = ACC_FRAC - OUT_FRAC;
  localparam int PW    = ACC_W + 2;

  typedef logic signed [CF_W-1:0] cf_t;
  typedef logic signed [OP_W-1:0] op_t;

  localparam cf_t K80 = cf_t'(COL ? C2_8_0 : C1_8_0);
  localparam cf_t K81 = cf_t'(COL ? C2_8_1 : C1_8_1);
  localparam cf_t K82 = cf_t'(COL ? C2_8_2 : C1_8_2);
  localparam cf_t K83 = cf_t'(COL ? C2_8_3 : C1_8_3);
  localparam cf_t K40 = cf_t'(COL ? C2_4_0 : C1_4_0);
  localparam cf_t K41 = cf_t'(COL ? C2_4_1 : C1_4_1);
  localparam cf_t K20 = cf_t'(COL ? C2_2_0 : C1_2_0);

  // ---------------- stage 1: serial to parallel ----------------
  logic signed [IN_W-1:0] sp_reg [7];
  logic [2:0]             sp_cnt;
  logic                   sp_mode;
  logic signed [IN_W-1:0] p0_vec [8];
  logic                   p0_valid, p0_idct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_cnt   <= '0;
      sp_mode  <= 1'b0;
      p0_valid <= 1'b0;
      p0_idct  <= 1'b0;
      for (int i = 0; i < 7; i++) sp_reg[i] <= '0;
      for (int i = 0; i < 8; i++) p0_vec[i] <= '0;
    end else begin
      p0_valid <= 1'b0;
      if (in_valid) begin
        sp_cnt <= sp_cnt + 3'd1;
        if (sp_cnt == 3'd0) sp_mode <= in_idct;
        if (sp_cnt != 3'd7) sp_reg[sp_cnt] <= in_data;
        else begin
          for (int i = 0; i < 7; i++) p0_vec[i] <= sp_reg[i];
          p0_vec[7] <= in_data;
          p0_valid  <= 1'b1;
          p0_idct   <= sp_mode;
        end
      end
    end
  end

  // ---------------- stage 2: pre-processor ----------------
  op_t pre_d8 [4];
  op_t pre_d4 [2];
  op_t pre_d2, pre_s2;
  op_t r_d8 [4];
  op_t r_d4 [2];
  op_t r_d2, r_s2;
  logic r_idct;

  dct_preproc #(.W(IN_W)) u_pre (
    .idct(p0_idct), .x(p0_vec), .d8(pre_d8), .d4(pre_d4), .d2(pre_d2), .s2(pre_s2)
  );

  // ---------------- stage 3: multiplier-adder ----------------
  logic        mac_act;
  logic [2:0]  mac_k;
  op_t         mop [4];
  cf_t         mcf [4];
  logic signed [ACC_W-1:0] macc;
  logic signed [ACC_W-1:0] mreg [8];
  logic        m_done, m_idct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r_d8[i] <= '0;
      r_d4[0] <= '0; r_d4[1] <= '0; r_d2 <= '0; r_s2 <= '0;
      r_idct  <= 1'b0;
      mac_act <= 1'b0;
      mac_k   <= '0;
    end else begin
      if (p0_valid) begin
        r_d8 <= pre_d8; r_d4 <= pre_d4; r_d2 <= pre_d2; r_s2 <= pre_s2;
        r_idct  <= p0_idct;
        mac_act <= 1'b1;
        mac_k   <= '0;
      end else if (mac_act) begin
        mac_k <= mac_k + 3'd1;
        if (mac_k == 3'd7) mac_act <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin mop[i] = '0; mcf[i] = '0; end
    unique case (mac_k)
      3'd0: begin  // m(0) = C2(0) * s2  (DCT: C2(0) * (d2' + s2'))
        mop[0] = r_s2; mcf[0] = K20;
        if (!r_idct) begin mop[1] = r_d2; mcf[1] = K20; end
      end
      3'd1: begin
        mop[0] = r_d8[0]; mcf[0] = K80;  mop[1] = r_d8[1]; mcf[1] = K81;
        mop[2] = r_d8[2]; mcf[2] = K82;  mop[3] = r_d8[3]; mcf[3] = K83;
      end
      3'd2: begin
        mop[0] = r_d4[0]; mcf[0] = K40;  mop[1] = r_d4[1]; mcf[1] = K41;
      end
      3'd3: begin
        mop[0] = r_d8[3]; mcf[0] = -K80; mop[1] = r_d8[0]; mcf[1] = K81;
        mop[2] = r_d8[1]; mcf[2] = K82;  mop[3] = r_d8[2]; mcf[3] = K83;
      end
      3'd4: begin  // m(4) = C2(0) * d2  (DCT: C2(0) * (d2' - s2'))
        mop[0] = r_d2; mcf[0] = K20;
        if (!r_idct) begin mop[1] = r_s2; mcf[1] = -K20; end
      end
      3'd5: begin
        mop[0] = r_d8[1]; mcf[0] = -K80; mop[1] = r_d8[2]; mcf[1] = -K81;
        mop[2] = r_d8[3]; mcf[2] = -K82; mop[3] = r_d8[0]; mcf[3] = K83;
      end
      3'd6: begin
        mop[0] = r_d4[1]; mcf[0] = -K40; mop[1] = r_d4[0]; mcf[1] = K41;
      end
      default: begin // 7
        mop[0] = r_d8[2]; mcf[0] = -K80; mop[1] = r_d8[3]; mcf[1] = -K81;
        mop[2] = r_d8[0]; mcf[2] = K82;  mop[3] = r_d8[1]; mcf[3] = K83;
      end
    endcase
  end

  dct_muladd #(.OP_W(OP_W), .CF_W(CF_W), .ACC_W(ACC_W), .SHIFT(SHIFT)) u_mac (
    .op(mop), .cf(mcf), .acc(macc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) mreg[i] <= '0;
      m_done <= 1'b0;
      m_idct <= 1'b0;
    end else begin
      m_done <= 1'b0;
      if (mac_act) begin
        mreg[mac_k] <= macc;
        if (mac_k == 3'd7) begin
          m_done <= 1'b1;
          m_idct <= r_idct;
        end
      end
    end
  end

  // ---------------- stage 4: post-processor ----------------
  logic signed [PW-1:0] post_y [8];
  logic signed [PW-1:0] pv [8];
  logic                 pv_idct;

  dct_postproc #(.W(ACC_W)) u_post (.idct(m_idct), .m(mreg), .y(post_y));

  // ---------------- stage 5: parallel to serial, round, limit ----------------
  logic       ps_act;
  logic [2:0] ps_k;
  logic signed [PW:0] ps_rnd;
  localparam logic signed [PW:0] OMAX = (PW+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [PW:0] OMIN = (PW+1)'(-(64'sd1 <<< (OUT_W - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) pv[i] <= '0;
      pv_idct <= 1'b0;
      ps_act  <= 1'b0;
      ps_k    <= '0;
    end else begin
      if (m_done) begin
        pv      <= post_y;
        pv_idct <= m_idct;
        ps_act  <= 1'b1;
        ps_k    <= '0;
      end else if (ps_act) begin
        ps_k <= ps_k + 3'd1;
        if (ps_k == 3'd7) ps_act <= 1'b0;
      end
    end
  end

  always_comb begin
    if (RSH > 0) ps_rnd = ((PW+1)'(pv[ps_k]) + ((PW+1)'(1) <<< (RSH - 1))
                           - (PW+1)'(signed'({1'b0, pv[ps_k] < 0}))) >>> RSH;
    else         ps_rnd = (PW+1)'(pv[ps_k]);
    if (ps_rnd > OMAX)      out_data = OUT_W'(OMAX);
    else if (ps_rnd < OMIN) out_data = OUT_W'(OMIN);
    else                    out_data = OUT_W'(ps_rnd);
  end

  assign out_valid = ps_act;
  assign out_idct  = pv_idct;

endmodule
