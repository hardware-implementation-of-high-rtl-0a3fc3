// vit_ref_pkg -- reference models used by the testbenches.
//
// A straightforward software model of the code and of frame-wise Viterbi
// decoding, written independently of the RTL: the encoder keeps an
// explicit 7-bit window of inputs (current input in the top bit) and
// applies the octal polynomials 171 and 133 directly; the decoder walks
// forward from every state, keeps the smaller metric per next state
// (keeping the lower predecessor on a tie) and traces back from state 0.
package vit_ref_pkg;

  localparam int REF_L  = 30;
  localparam int REF_M  = 6;
  localparam int REF_NS = 64;

  typedef bit [REF_NS-1:0] dec_row_t;

  // Window w[6] = current input, w[5] = previous, ... w[0] = six back.
  // Polynomial bit j taps w[j] (octal 171 = 1111001, msb = current input).
  function automatic bit [1:0] ref_enc(bit [6:0] w);
    bit [6:0] g0, g1;
    g0 = 7'b1111001;
    g1 = 7'b1011011;
    return {^(w & g0), ^(w & g1)};
  endfunction

  // Encode a frame of bits (bits[0] first); the encoder starts in state 0.
  function automatic void ref_encode(input bit bits[], output bit [1:0] syms[]);
    bit [6:0] w;
    w = '0;
    syms = new[bits.size()];
    foreach (bits[i]) begin
      w = {bits[i], w[6:1]};
      syms[i] = ref_enc(w);
    end
  endfunction

  function automatic int hd(bit [1:0] a, bit [1:0] b);
    bit [1:0] d;
    d = a ^ b;
    return int'(d[0]) + int'(d[1]);
  endfunction

  // Symbol on the branch from state s (s[0] newest) with input u.
  function automatic bit [1:0] branch_sym(int s, bit u);
    bit [6:0] w;
    for (int k = 0; k < 6; k++) w[5-k] = s[k];  // s[0]=1 back -> w[5]
    w[6] = u;
    return ref_enc(w);
  endfunction

  // One ACS stage. pm_in/pm_out per state; dec[ns]=1 if the winning
  // predecessor had its oldest bit (s[5]) set.
  function automatic void ref_stage(input int pm_in[REF_NS], input bit [1:0] rx,
                                    output int pm_out[REF_NS], output dec_row_t dec);
    for (int ns = 0; ns < REF_NS; ns++) begin
      pm_out[ns] = 1 << 30;
      dec[ns] = 0;
    end
    for (int s = 0; s < REF_NS; s++)
      for (int u = 0; u < 2; u++) begin
        int ns, m;
        ns = ((s << 1) & (REF_NS - 1)) | u;
        m = pm_in[s] + hd(rx, branch_sym(s, bit'(u)));
        if (m < pm_out[ns]) begin
          pm_out[ns] = m;
          dec[ns] = bit'(s >> 5);
        end
      end
  endfunction

  // Decode a frame of received symbols; returns the decoded bits and the
  // final metric of state 0.
  function automatic void ref_decode(input bit [1:0] rx[], output bit bits[], output int pm0);
    int pm[REF_NS], pmn[REF_NS];
    dec_row_t dec[];
    int st;
    dec = new[rx.size()];
    bits = new[rx.size()];
    for (int s = 0; s < REF_NS; s++) pm[s] = (s == 0) ? 0 : 100000;
    foreach (rx[t]) begin
      ref_stage(pm, rx[t], pmn, dec[t]);
      pm = pmn;
    end
    pm0 = pm[0];
    st = 0;
    for (int t = rx.size() - 1; t >= 0; t--) begin
      bits[t] = bit'(st & 1);
      st = (st >> 1) | (int'(dec[t][st]) << 5);
    end
  endfunction

endpackage
