// Distributed-arithmetic look-up table for one bit plane.
//
// Bit i of addr is bit b of the sample in tap i; the table returns
//     data = sum over i with addr[i] = 1 of coef[i]      (modulo 2^LUT_W)
// i.e. the partial sum that bit plane b contributes to the filter output
// before its 2^b weighting. The coefficients are inputs, so the table is not
// a ROM: every word of it is formed from the coefficients by adders, and the
// address selects one word, exactly as a precomputed DA memory would.
//
// Divided table: with SUB_TAPS < TAPS the taps are split into
// ceil(TAPS/SUB_TAPS) groups of SUB_TAPS taps; each group has its own table of
// 2^SUB_TAPS words, addressed by its own address bits, and the group outputs
// are added. This trades one 2^TAPS-word table for several 2^SUB_TAPS-word
// tables (L = m x k). SUB_TAPS = TAPS, the default, is one undivided table per
// bit plane, which is what the published 5-tap and 8-tap filters use.
//
// LUT_W is the table word width. The published filters keep it equal to the
// coefficient width, so a sum that does not fit wraps around; that behaviour
// is kept. LUT_W >= COEF_W + clog2(TAPS) makes the table exact.
//
// Timing: purely combinational.
module da_lut #(
  parameter int unsigned TAPS     = 8,
  parameter int unsigned COEF_W   = 8,
  parameter int unsigned LUT_W    = 8,
  parameter int unsigned SUB_TAPS = TAPS
) (
  input  logic [COEF_W-1:0] coef [TAPS],
  input  logic [TAPS-1:0]   addr,
  output logic [LUT_W-1:0]  data
);

  localparam int unsigned NSUB  = (TAPS + SUB_TAPS - 1) / SUB_TAPS;
  localparam int unsigned WORDS = 1 << SUB_TAPS;
  localparam int unsigned PAD_W = NSUB * SUB_TAPS;

  logic [LUT_W-1:0]  table_q [NSUB][WORDS];
  logic [PAD_W-1:0]  addr_pad;
  logic [LUT_W-1:0]  sub_data [NSUB];

  // Table contents: word a of group s is the sum of the coefficients of the
  // taps of that group whose address bit is set in a.
  always_comb begin
    for (int s = 0; s < int'(NSUB); s++) begin
      for (int a = 0; a < int'(WORDS); a++) begin
        logic [LUT_W-1:0] acc;
        acc = '0;
        for (int j = 0; j < int'(SUB_TAPS); j++) begin
          if ((s * int'(SUB_TAPS) + j) < int'(TAPS) && a[j])
            acc = acc + LUT_W'(coef[s * int'(SUB_TAPS) + j]);
        end
        table_q[s][a] = acc;
      end
    end
  end

  assign addr_pad = PAD_W'(addr);

  always_comb begin
    data = '0;
    for (int s = 0; s < int'(NSUB); s++) begin
      sub_data[s] = table_q[s][addr_pad[s * int'(SUB_TAPS) +: SUB_TAPS]];
      data        = data + sub_data[s];
    end
  end

  initial begin
    assert (SUB_TAPS >= 1 && SUB_TAPS <= TAPS)
      else $error("da_lut: SUB_TAPS must be between 1 and TAPS");
  end

endmodule
