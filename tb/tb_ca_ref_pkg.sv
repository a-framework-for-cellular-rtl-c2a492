// tb_ca_ref_pkg: behavioural reference of the CA transition rules, used by
// the testbenches to work out expected cells independently of the engine's
// datapath. `win` holds an n x n window row-major (row 0 north, column 0
// west); weights come from the configuration function ca_pkg::nb_weight.
package tb_ca_ref_pkg;
  import ca_pkg::*;

  function automatic int ref_next(rule_e rule, bit weighted, int n, int c,
                                  int k, int g, int thresh, int win[]);
    int maxs, sum, a, b, centre, q;
    maxs = (1 << c) - 1;
    sum = 0; a = 0; b = 0;
    centre = win[((n - 1) / 2) * n + (n - 1) / 2];
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int v;
        v = win[i * n + j];
        sum += int'(nb_weight(rule, weighted, n, i, j)) * v;
        if (rule == RULE_GREENBERG) begin
          if (v == 1) a++;
        end else if (v > 0 && v < maxs) a++;
        if (v == maxs) b++;
      end
    case (rule)
      RULE_APHYSICS: return ((sum >= 20 && sum <= 23) || (sum >= 59 && sum <= 100)) ? 1 : 0;
      RULE_GREENBERG: begin
        if (centre == 0) return (a > thresh) ? 1 : 0;
        return (centre + 1) % (maxs + 1);
      end
      default: begin
        if (centre == 0) begin
          q = (a + b) / k;
          return (q > maxs) ? maxs : q;
        end
        if (centre == maxs) return 0;
        q = sum / ((a == 0) ? 1 : a) + g;
        return (q > maxs) ? maxs : q;
      end
    endcase
  endfunction
endpackage
