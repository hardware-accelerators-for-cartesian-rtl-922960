// Reference models used by the testbenches.
//
// Plain behavioural re-statements of what the hardware computes, written
// independently of the RTL: the 16 symbolic-regression functions, the 4
// logic functions, whole-candidate evaluation of both kinds of VRC for one
// input vector (the logic VRC one bit at a time, not bit-parallel), and
// random valid configurations. Configuration words are passed as 256-bit
// column words; node r of a column occupies bits [r*PEW +: PEW], with
// {selA, selB, func} from most to least significant.
package cgp_ref_pkg;

  typedef logic [255:0] colw_t;

  function automatic logic [7:0] sr_f(int f, logic [7:0] x, logic [7:0] y);
    int s;
    s = int'(x) + int'(y);
    case (f)
      0:  return 8'd255;
      1:  return x;
      2:  return 8'(255 - int'(x));
      3:  return x | y;
      4:  return (~x) | y;
      5:  return x & y;
      6:  return ~(x & y);
      7:  return x ^ y;
      8:  return 8'(int'(x) / 2);
      9:  return 8'(int'(x) / 4);
      10: return (int'(x) > int'(y)) ? 8'(int'(x) - int'(y)) : 8'd0;
      11: return 8'(s % 256);
      12: return (s > 255) ? 8'd255 : 8'(s);
      13: return 8'(s / 2);
      14: return (x > y) ? x : y;
      default: return (x < y) ? x : y;
    endcase
  endfunction

  function automatic logic lc_f(int f, logic a, logic b);
    case (f)
      0: return a;
      1: return a & b;
      2: return a ^ b;
      default: return !a && b;
    endcase
  endfunction

  // Symbolic-regression VRC: rows x cols CFBs, 12 bits per CFB, source codes
  // 0..ni-1 inputs, ni..ni+rows-1 previous column, others read 0.
  function automatic logic [7:0] sr_eval(colw_t conf[], int rows, int ni, logic [7:0] vin[]);
    logic [7:0] prev[], cur[];
    prev = new[rows];
    cur  = new[rows];
    foreach (prev[i]) prev[i] = 0;
    for (int c = 0; c < conf.size(); c++) begin
      for (int r = 0; r < rows; r++) begin
        int sa, sb, f;
        logic [7:0] a, b;
        sa = int'(conf[c][r*12+8 +: 4]);
        sb = int'(conf[c][r*12+4 +: 4]);
        f  = int'(conf[c][r*12 +: 4]);
        a = (sa < ni) ? vin[sa] : (sa < ni + rows && c > 0) ? prev[sa-ni] : 8'd0;
        b = (sb < ni) ? vin[sb] : (sb < ni + rows && c > 0) ? prev[sb-ni] : 8'd0;
        cur[r] = sr_f(f, a, b);
      end
      prev = cur;
      cur = new[rows];
    end
    return prev[0];
  endfunction

  // Logic VRC, one input vector (bit j of v = input j); returns outputs as
  // bits 0..no-1.
  function automatic logic [63:0] lc_eval(colw_t conf[], int rows, int ni, int no, int lback,
                                          int selw, logic [63:0] v);
    logic [63:0] p1, p2, cur;
    int pew;
    pew = 2 * selw + 2;
    p1 = 0;
    p2 = 0;
    for (int c = 0; c < conf.size(); c++) begin
      cur = 0;
      for (int r = 0; r < rows; r++) begin
        int s[2], f;
        logic x[2];
        s[0] = int'(conf[c][r*pew + selw + 2 +: 8]) & ((1 << selw) - 1);
        s[1] = int'(conf[c][r*pew + 2 +: 8]) & ((1 << selw) - 1);
        f    = int'(conf[c][r*pew +: 2]);
        for (int k = 0; k < 2; k++) begin
          if (s[k] < ni)                               x[k] = v[s[k]];
          else if (s[k] < ni + rows)                   x[k] = (c >= 1) ? p1[s[k]-ni] : 1'b0;
          else if (lback >= 2 && s[k] < ni + 2 * rows) x[k] = (c >= 2) ? p2[s[k]-ni-rows] : 1'b0;
          else                                         x[k] = 1'b0;
        end
        cur[r] = lc_f(f, x[0], x[1]);
      end
      p2 = p1;
      p1 = cur;
    end
    return p1 & ((64'd1 << no) - 1);
  endfunction

  function automatic int popcount64(logic [63:0] x);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(x[i]);
    return n;
  endfunction

  // Random column word: every field random over its full code range, so
  // out-of-range selects are exercised as well.
  function automatic colw_t rand_col(int nodes, int pew);
    colw_t w = 0;
    for (int i = 0; i < nodes * pew; i++) w[i] = 1'($urandom_range(0, 1));
    return w;
  endfunction

endpackage
