// tb_vit_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the encoder follows the printed state
// diagram as a transition table, and the decoder reference keeps for each
// state the complete input history of its path (no decision bits and no
// traceback). Every second step it keeps only the best path and the path of
// the state differing from it in the newest bit if that path's metric is at
// most THR, with ties for the best going to the lower state number and, inside the ACS,
// to the predecessor whose oldest bit is 0. Metrics saturate at 2^W - 1.
package tb_vit_ref_pkg;

  // Transition table of the encoder state diagram: next state and output
  // label {Out1, Out0} for state s (0..3) and input u.
  function automatic int ref_next(int s, int u);
    case ({s[1:0], u[0]})
      3'b000: return 0;  3'b001: return 1;   // S0 -0-> S0, S0 -1-> S1
      3'b010: return 2;  3'b011: return 3;   // S1 -0-> S2, S1 -1-> S3
      3'b100: return 0;  3'b101: return 1;   // S2 -0-> S0, S2 -1-> S1
      default: return u[0] ? 3 : 2;          // S3 -0-> S2, S3 -1-> S3
    endcase
  endfunction

  function automatic int ref_label(int s, int u);
    case ({s[1:0], u[0]})
      3'b000: return 'b00;  3'b001: return 'b11;
      3'b010: return 'b01;  3'b011: return 'b10;
      3'b100: return 'b11;  3'b101: return 'b00;
      3'b110: return 'b10;  default: return 'b01;
    endcase
  endfunction

  // Encode n bits (bits[0] first) from state S0.
  function automatic void ref_encode(input logic bits [], output logic [1:0] syms []);
    int s = 0;
    syms = new[bits.size()];
    foreach (bits[i]) begin
      syms[i] = 2'(ref_label(s, int'(bits[i])));
      s       = ref_next(s, int'(bits[i]));
    end
  endfunction

  function automatic int hd(logic [1:0] a, logic [1:0] b);
    logic [1:0] d = a ^ b;
    return int'(d[0]) + int'(d[1]);
  endfunction

  // Pruned hard-decision decoder; returns the decoded bits (first bit in
  // the MSB of the result) of the best path, and its metric.
  function automatic logic [63:0] ref_decode(input logic [1:0] syms [], input int W,
                                             input int THR, output int best_metric);
    int          maxv = (1 << W) - 1;
    int          pm [4], npm [4];
    bit          lv [4], nlv [4];
    logic [63:0] hist [4], nhist [4];
    int          b1, b2;
    for (int s = 0; s < 4; s++) begin pm[s] = 0; lv[s] = (s == 0); hist[s] = '0; end
    foreach (syms[t]) begin
      for (int n = 0; n < 4; n++) begin
        nlv[n] = 0; npm[n] = 0; nhist[n] = '0;
        // Predecessors of n, oldest-bit-0 first.
        for (int j = 0; j < 2; j++) begin
          for (int p = 0; p < 4; p++) begin
            if (p[1] == j[0] && lv[p] && ref_next(p, n & 1) == n) begin
              int c = pm[p] + hd(syms[t], 2'(ref_label(p, n & 1)));
              if (c > maxv) c = maxv;
              if (!nlv[n] || c < npm[n]) begin
                nlv[n] = 1; npm[n] = c; nhist[n] = {hist[p][62:0], 1'(n & 1)};
              end
            end
          end
        end
      end
      pm = npm; lv = nlv; hist = nhist;
      if (t % 2 == 1) begin
        b1 = -1; b2 = -1;
        for (int s = 0; s < 4; s++) if (lv[s] && (b1 < 0 || pm[s] < pm[b1])) b1 = s;
        if (lv[b1 ^ 1] && pm[b1 ^ 1] <= THR) b2 = b1 ^ 1;
        for (int s = 0; s < 4; s++) lv[s] = (s == b1) || (s == b2);
      end
    end
    b1 = -1;
    for (int s = 0; s < 4; s++) if (lv[s] && (b1 < 0 || pm[s] < pm[b1])) b1 = s;
    best_metric = pm[b1];
    return hist[b1];
  endfunction

endpackage
