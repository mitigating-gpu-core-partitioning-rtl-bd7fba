// warp_selection_logic: hierarchical comparator network that picks the
// candidate with the lowest key.
//
// Each leaf is a (valid, key) pair; each comparator node passes on the
// smaller of its two inputs, an invalid input always losing and a tie going
// to the lower index. After log2(N) levels the root holds the index of the
// lowest-keyed valid entry. In the RBA scheduler the key is
// {RBA score, ~age}: the lowest score wins and, among equal scores, the
// oldest warp. Purely combinational. N is padded up to a power of two inside.
module warp_selection_logic #(
  parameter int N     = 16,
  parameter int KEY_W = 13,
  parameter int IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]            valid,
  input  logic [N-1:0][KEY_W-1:0] key,
  output logic                    found,
  output logic [IDX_W-1:0]        idx
);
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int P      = 1 << LEVELS;

  // node arrays per level: level 0 has P leaves, level LEVELS has the root
  logic [LEVELS:0][P-1:0]            lv_v;
  logic [LEVELS:0][P-1:0][KEY_W-1:0] lv_k;
  logic [LEVELS:0][P-1:0][IDX_W-1:0] lv_i;

  always_comb begin
    logic take_b;
    lv_v = '0;
    lv_k = '0;
    lv_i = '0;
    for (int i = 0; i < P; i++) begin
      lv_v[0][i] = (i < N) ? valid[i] : 1'b0;
      lv_k[0][i] = (i < N) ? key[i] : '0;
      lv_i[0][i] = IDX_W'(i);
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < (P >> (l + 1)); i++) begin
        take_b = lv_v[l][2*i+1] &&
                 (!lv_v[l][2*i] || (lv_k[l][2*i+1] < lv_k[l][2*i]));
        lv_v[l+1][i] = lv_v[l][2*i] || lv_v[l][2*i+1];
        lv_k[l+1][i] = take_b ? lv_k[l][2*i+1] : lv_k[l][2*i];
        lv_i[l+1][i] = take_b ? lv_i[l][2*i+1] : lv_i[l][2*i];
      end
    end
  end

  assign found = lv_v[LEVELS][0];
  assign idx   = lv_i[LEVELS][0];
endmodule
