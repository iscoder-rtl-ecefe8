// Software models shared by the iSCoder testbenches (included inside a
// testbench module).
//
// gen_block  - a MatchC test block: symbols from {A,C,G,T} with a long run
//              (to reach the 255-symbol cap), a stretch of novel symbols
//              (length-0 steps) and a copied stretch, from a seeded generator.
// gen_qs     - a LutC test block: 7-bit quality-score-like symbols crowded
//              around 30..41, like real quality scores, so that the hot
//              contexts collide.
// matchc_model - the MatchC kernel: for each coded position the longest run
//              (capped at window-1) over all window starts, ties to the latest
//              start; advance by the length, at least one. It also counts the
//              mask shifts and window refreshes a 2*window-column array needs,
//              the length-0 steps and the capped matches.
// lut_sym    - the test lookup table: row (a1, a2) holds symbol
//              (5*j + 3*a1 + 7*a2) mod 128 at position j, a permutation.
// lut_row    - physical row r of LutC array arr in the accelerator layout:
//              lane r/128, position j = r%128, slot s = block*8 + addr2/16 with
//              addr1 the context whose remapped id is arr*8 + block; the first
//              line of each 8-bit slot is the symbol's MSB.
// lut_find   - the expected LutC output word for a tuple.

logic [7:0] blk [8192];
int mdl_refresh = 0, mdl_shift = 0, mdl_zero = 0, mdl_cap = 0;   // MatchC events seen by the model

function automatic int unsigned lcg(inout int unsigned st);
  st = st * 1103515245 + 12345;
  return (st >> 16) & 32'h7fff;
endfunction

task automatic gen_block(int seed, int n);
  int unsigned st;
  st = seed;
  for (int k = 0; k < n; k++) blk[k] = 8'("ACGT" >> (8 * (lcg(st) % 4)));
  for (int k = 280; k < n && k < 560; k++) blk[k] = blk[k - 1];
  for (int k = 600; k < n && k < 640; k++) blk[k] = 8'(k * 37 + seed);
  for (int k = 700; k < n && k < 760; k++) blk[k] = blk[k - 150];
endtask

task automatic gen_qs(int seed, int n);
  int unsigned st;
  st = seed;
  for (int k = 0; k < n; k++)
    blk[k] = (lcg(st) % 4 == 0) ? 8'(lcg(st) % 128) : 8'(30 + lcg(st) % 12);
endtask

task automatic matchc_model(int n, int w, int ncol, ref int len_o [], ref int ptr_o [],
                            output int nres);
  int i, bl, bc, l, s;
  len_o = new[n]; ptr_o = new[n];
  nres = 0;
  i = w;
  s = 0;
  while (i < n) begin
    bl = 0; bc = 0;
    for (int c = 0; c < w; c++) begin
      l = 0;
      while (l < w - 1 && i + l < n && blk[i - w + c + l] == blk[i + l]) l++;
      if (l > 0 && l >= bl) begin bl = l; bc = c; end
    end
    len_o[nres] = bl; ptr_o[nres] = bc; nres++;
    if (bl == 0) mdl_zero++;
    if (bl == w - 1) mdl_cap++;
    i += (bl == 0) ? 1 : bl;
    if (i < n) begin
      s += (bl == 0) ? 1 : bl;
      if (s > ncol - w) begin s = 0; mdl_refresh++; end
      else mdl_shift++;
    end
  end
endtask

function automatic int remap_ref(int a);
  if (a >= 28 && a <= 43) return (a - 28) * 8;
  if (a == 96) return 33;
  if (a % 8 == 0) return a / 8 + 28;
  return a;
endfunction

function automatic int lut_sym(int a1, int a2, int j);
  return (5 * j + 3 * a1 + 7 * a2) % 128;
endfunction

function automatic logic [511:0] lut_row(int arr, int r);
  int inv [128];
  logic [7:0] s8;
  for (int a = 0; a < 128; a++) inv[remap_ref(a)] = a;
  for (int s = 0; s < 64; s++) begin
    s8 = 8'(lut_sym(inv[arr * 8 + s / 8], (s % 8) * 16 + r / 128, r % 128));
    for (int k = 0; k < 8; k++) lut_row[s * 8 + k] = s8[7 - k];
  end
endfunction

function automatic int lut_find(int a1, int a2, int sym);
  for (int j = 0; j < 128; j++) if (lut_sym(a1 & 127, a2 & 127, j) == (sym & 127)) return j;
  return 32'h8000;
endfunction
