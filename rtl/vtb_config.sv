// Configuration decoder of the reconfigurable traceback.
//
// From the constraint length K (5..9) it derives every per-standard
// control of the datapath, combinationally:
//   - seg_bits  = K-4: a stage's 2^(K-1) decisions fill 2^(K-4) RAM words
//   - words     = 2^(K-4), the segment size of Table-1 style mappings
//                 (K=9: 32, K=7: 8, K=6: 4, K=5: 2)
//   - last_stage= 6K-1, the down counter's load value (WL = 6K: 54,42,36,30)
//   - shift     = K-5, the shift that puts the counter just above the
//                 seg_bits word-index bits of the read address
//   - buf_state / buf_shift: the enables of the tri-state buffers B1-B4
//     (address bits 4..1 from state bits D8..D5) and B5-B8 (the same
//     address bits from the shifter's 4 LSBs). Address bit i (1..4) comes
//     from the state when i < seg_bits; the two buffers on one bit are
//     never on together.
// WL = 6K and the buffer roles follow the published design; deriving the enables
// from K by this rule (rather than storing a per-standard table) is this
// design's choice. A K outside 5..9 is clamped into that range.
module vtb_config
  import vtb_pkg::*;
(
  input  k_t   k_i,
  output cfg_t cfg_o
);

  k_t k;

  always_comb begin
    if (k_i < k_t'(K_MIN))      k = k_t'(K_MIN);
    else if (k_i > k_t'(K_MAX)) k = k_t'(K_MAX);
    else                        k = k_i;

    cfg_o            = '0;
    cfg_o.k          = k;
    cfg_o.seg_bits   = 3'(k - 4'd4);
    cfg_o.shift      = 3'(k - 4'd5);
    cfg_o.words      = 6'd1 << (k - 4'd4);
    cfg_o.last_stage = cnt_t'(WL_FACTOR * k - 1);
    for (int i = 1; i <= 4; i++) begin
      // index 3 of the vectors is address bit 4 (B1 / B5), index 0 is bit 1 (B4 / B8)
      cfg_o.buf_state[i-1] = (3'(i) < cfg_o.seg_bits);
      cfg_o.buf_shift[i-1] = !(3'(i) < cfg_o.seg_bits);
    end
  end

endmodule
