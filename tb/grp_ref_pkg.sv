// grp_ref_pkg: behavioural reference of the GRP permutation for testbenches.
//
// Written independently of the RTL: a stage of distance d pairs position p
// with p ^ d; the pair's H position is the one with bit d clear, and the
// pair exchanges when the control bit at the H position is 0 and the pair
// is built (keep). Positions are numbered left to right, position p is bit
// [7-p]. Also holds the published example: the arrangement
// A7 A6 A5 A4 A3 A2 A0 A1, its key and the arrangements after each stage.
package grp_ref_pkg;

  typedef logic [7:0] sw_t;

  function automatic sw_t ref_stage(sw_t din, sw_t cw, int d, logic [3:0] keep);
    sw_t r;
    for (int p = 0; p < 8; p++) begin
      int h = p & ~d;
      int j = (h / (2 * d)) * d + (h % d);
      bit x = keep[3-j] && (cw[7-h] == 1'b0);
      r[7-p] = x ? din[7-(p ^ d)] : din[7-p];
    end
    return r;
  endfunction

  function automatic sw_t ref_tx(logic [23:0] key, sw_t din, logic [11:0] keep);
    sw_t v = din;
    v = ref_stage(v, key[23:16], 4, keep[11:8]);
    v = ref_stage(v, key[15:8],  2, keep[7:4]);
    v = ref_stage(v, key[7:0],   1, keep[3:0]);
    return v;
  endfunction

  function automatic sw_t ref_rx(logic [23:0] key, sw_t din, logic [11:0] keep);
    sw_t v = din;
    v = ref_stage(v, key[7:0],   1, keep[11:8]);
    v = ref_stage(v, key[15:8],  2, keep[7:4]);
    v = ref_stage(v, key[23:16], 4, keep[3:0]);
    return v;
  endfunction

  // Published example, items named by index k of Ak, left to right.
  localparam logic [23:0] EX_KEY = 24'b10101100_11010010_00101010;
  typedef int arr_t [8];
  localparam arr_t EX_IN   = '{7, 6, 5, 4, 3, 2, 0, 1};
  localparam arr_t EX_S1   = '{7, 2, 5, 1, 3, 6, 0, 4};
  localparam arr_t EX_S2   = '{7, 2, 5, 1, 0, 4, 3, 6};
  localparam arr_t EX_OUT  = '{2, 7, 5, 1, 0, 4, 3, 6};

  // Subword with a 1 only at the position of item k in arrangement a.
  function automatic sw_t onehot_item(arr_t a, int k);
    sw_t r = '0;
    for (int p = 0; p < 8; p++) if (a[p] == k) r[7-p] = 1'b1;
    return r;
  endfunction

endpackage
