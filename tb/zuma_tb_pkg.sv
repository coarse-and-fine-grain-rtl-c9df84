// zuma_tb_pkg: configuration builder and reference models shared by the
// ZUMA testbenches, at the default architecture (k = 6, N = 8, I = 28,
// W = 112, L = 4).
//
// A tile configuration names, for every LUTRAM used as a multiplexer, which
// of its K inputs it passes (-1: constant 0); cfg_word() turns it into the
// 184-bit word the tile loads at one LUTRAM address.  Word layout (the
// tile's own choice, see zuma_tile): input block, switch block, IIB stage 1,
// IIB stage 2, eLUT truth tables, flop-bypass modes.
package zuma_tb_pkg;
  localparam int K = 6, N = 8, I = 28, W = 112, L = 4;
  localparam int WD = W / 2, S = WD / L, P = (I + N) / K, TRK = 4 * WD;
  localparam int O_SB = I, O_IIB = O_SB + 4*S, O_LUT = O_IIB + P*K + K*N, O_MOD = O_LUT + N;
  localparam int CFG_W = O_MOD + N;

  typedef struct {
    int          ib [I];        // input block mux i: which of its K tracks
    int          sb [4*S];      // switch block start wire d*S+s: which input
    int          s1 [P][K];     // IIB stage-1 crossbar p, output j: which input
    int          s2 [K][N];     // IIB stage-2 crossbar j, output n: which input
    logic [63:0] lut [N];
    bit          mode [N];      // 1: registered eBLE output
  } tile_cfg_t;

  function automatic int track_of(int i, int j);
    return (i*(TRK/I) + j*(TRK/K + 1)) % TRK;
  endfunction

  function automatic int perp(int d, int which);
    return (d < 2) ? 2 + which : which;
  endfunction

  function automatic tile_cfg_t cfg_off();
    tile_cfg_t t;
    foreach (t.ib[i]) t.ib[i] = -1;
    foreach (t.sb[i]) t.sb[i] = -1;
    foreach (t.s1[p, j]) t.s1[p][j] = -1;
    foreach (t.s2[j, n]) t.s2[j][n] = -1;
    foreach (t.lut[n]) t.lut[n] = '0;
    foreach (t.mode[n]) t.mode[n] = 0;
    return t;
  endfunction

  function automatic tile_cfg_t cfg_random();
    tile_cfg_t t;
    foreach (t.ib[i]) t.ib[i] = int'($urandom_range(K)) - 1;
    foreach (t.sb[i]) t.sb[i] = int'($urandom_range(K)) - 1;
    foreach (t.s1[p, j]) t.s1[p][j] = int'($urandom_range(K)) - 1;
    foreach (t.s2[j, n]) t.s2[j][n] = int'($urandom_range(P)) - 1;
    foreach (t.lut[n]) t.lut[n] = {$urandom, $urandom};
    foreach (t.mode[n]) t.mode[n] = 1'($urandom);
    return t;
  endfunction

  function automatic logic pick(int sel, int a);
    return sel < 0 ? 1'b0 : 1'((a >> sel) & 1);
  endfunction

  function automatic logic [CFG_W-1:0] cfg_word(tile_cfg_t t, int a);
    logic [CFG_W-1:0] w;
    w = '0;
    for (int i = 0; i < I; i++) w[i] = pick(t.ib[i], a);
    for (int i = 0; i < 4*S; i++) w[O_SB + i] = pick(t.sb[i], a);
    for (int p = 0; p < P; p++)
      for (int j = 0; j < K; j++) w[O_IIB + p*K + j] = pick(t.s1[p][j], a);
    for (int j = 0; j < K; j++)
      for (int n = 0; n < N; n++) w[O_IIB + P*K + j*N + n] = pick(t.s2[j][n], a % (1 << P));
    for (int n = 0; n < N; n++) begin
      w[O_LUT + n] = t.lut[n][a];
      w[O_MOD + n] = t.mode[n];
    end
    return w;
  endfunction

  // ---- reference models ----
  function automatic logic [I-1:0] ib_model(tile_cfg_t t, logic [TRK-1:0] tracks);
    logic [I-1:0] y;
    for (int i = 0; i < I; i++) y[i] = t.ib[i] < 0 ? 1'b0 : tracks[track_of(i, t.ib[i])];
    return y;
  endfunction

  function automatic logic [N*K-1:0] iib_model(tile_cfg_t t, logic [I+N-1:0] in);
    logic [K-1:0]   s1o [P];
    logic [N*K-1:0] y;
    for (int p = 0; p < P; p++)
      for (int j = 0; j < K; j++) s1o[p][j] = t.s1[p][j] < 0 ? 1'b0 : in[p*K + t.s1[p][j]];
    for (int j = 0; j < K; j++)
      for (int n = 0; n < N; n++) y[n*K + j] = t.s2[j][n] < 0 ? 1'b0 : s1o[t.s2[j][n]][j];
    return y;
  endfunction

  function automatic logic [4*S-1:0] sb_model(tile_cfg_t t, logic [4*S-1:0] term,
                                              logic [N-1:0] cl_out, logic user_en);
    logic [4*S-1:0] y;
    for (int d = 0; d < 4; d++)
      for (int s = 0; s < S; s++) begin
        int sel;
        logic v;
        sel = t.sb[d*S + s];
        case (sel)
          -1: v = 1'b0;
          0: v = term[d*S + s];
          1: v = term[perp(d, 0)*S + s];
          2: v = term[perp(d, 1)*S + s];
          default: v = cl_out[(3*s + 2*d + sel - 3) % N];
        endcase
        y[d*S + s] = v & user_en;
      end
    return y;
  endfunction

  function automatic logic [N-1:0] lut_model(tile_cfg_t t, logic [N*K-1:0] lut_in);
    logic [N-1:0] y;
    for (int n = 0; n < N; n++) y[n] = t.lut[n][lut_in[n*K +: K]];
    return y;
  endfunction
endpackage
