// Reference model of the transition code, used by the testbenches only.
//
// ref_decode is written as a scan with a moving index, the way the decoding
// rule is stated (look at j, j+1, j+2; after a swap move on by three, else by
// one), rather than as the unrolled loop of the RTL. ref_encode tries the
// three windows, keeps those whose decoding gives the word back, and picks
// the fewest transitions with ties to 00, 10, 01, 11.
package lp_ref_pkg;

  function automatic logic [0:7] ref_scan(logic [0:7] x, int start, int limit, bit inverse);
    logic [0:7] o = x;
    int j = start;
    while (j < limit) begin
      bit hit;
      if (inverse) hit = (o[j] != o[j+1]) && (o[j+1] != o[j+2]);
      else         hit = (o[j] == o[j+1]) && (o[j+1] != o[j+2]);
      if (hit) begin
        o[j+1] = !o[j+1];
        o[j+2] = !o[j+2];
        j += 3;
      end else begin
        j += 1;
      end
    end
    return o;
  endfunction

  function automatic void window(logic [1:0] l, output int start, output int limit);
    case (l)
      2'b10:   begin start = 0; limit = 3; end
      2'b01:   begin start = 3; limit = 6; end
      2'b11:   begin start = 0; limit = 6; end
      default: begin start = 0; limit = 0; end
    endcase
  endfunction

  function automatic logic [0:7] ref_decode(logic [0:7] x, logic [1:0] l);
    int s, e;
    window(l, s, e);
    return ref_scan(x, s, e, 1'b0);
  endfunction

  function automatic int ref_trans(logic [0:7] x);
    int n = 0;
    for (int i = 0; i < 7; i++) if (x[i] != x[i+1]) n++;
    return n;
  endfunction

  function automatic void ref_encode(logic [0:7] d, output logic [0:7] e, output logic [1:0] l);
    logic [1:0] order [3] = '{2'b10, 2'b01, 2'b11};
    e = d;
    l = 2'b00;
    foreach (order[k]) begin
      int s, lim;
      logic [0:7] c;
      window(order[k], s, lim);
      c = ref_scan(d, s, lim, 1'b1);
      if (ref_decode(c, order[k]) == d && ref_trans(c) < ref_trans(e)) begin
        e = c;
        l = order[k];
      end
    end
  endfunction

endpackage
