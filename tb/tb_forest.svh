// tb_forest.svh: random decision trees, their memory image in the DTU node
// format, and an independent reference walk. Included inside testbench
// modules (needs nothing else in scope).
//
// A tree is generated in heap order (children of node i are 2i+1 and 2i+2)
// up to depth MAXD_LIMIT, then laid out in pre-order: the left child follows
// its parent, the right child is at parent + right_rel, and every leaf holds
// the distance to the first node of the next tree in its subset.

localparam int HEAP = 1023;   // depth 9 complete tree

function automatic real h2r(logic [15:0] h);
  real m;
  int e;
  e = int'(h[14:10]);
  if (e == 0) m = real'(h[9:0]) / 1024.0 * (2.0 ** -14);
  else        m = (1.0 + real'(h[9:0]) / 1024.0) * (2.0 ** (e - 15));
  return h[15] ? -m : m;
endfunction

// value of a 14-bit leaf result in units of 2^-22, computed through reals
function automatic longint r14_fixed(logic [13:0] v);
  real m;
  int e;
  e = int'(v[12:8]);
  if (e == 0) m = real'(v[7:0]) / 256.0 * (2.0 ** -14);
  else        m = (1.0 + real'(v[7:0]) / 256.0) * (2.0 ** (e - 15));
  m = m * (2.0 ** 22);
  return v[13] ? -longint'(m) : longint'(m);
endfunction

// random finite binary16 value in roughly [-16, 16]
function automatic logic [15:0] rand_h();
  logic [15:0] h;
  h[15]    = 1'($urandom);
  h[14:10] = 5'($urandom_range(10, 18));
  h[9:0]   = 10'($urandom);
  return h;
endfunction

class Tree;
  bit          leaf [HEAP];
  bit          used [HEAP];
  logic [4:0]  feat [HEAP];
  logic [15:0] thr  [HEAP];
  logic [13:0] res  [HEAP];
  int          addr [HEAP];
  int          size;
  int          base;

  // maxd: maximum depth; nfeat: features used; cls: labels below ncls;
  // leaf_pct: chance (percent) that a node above maxd is made a leaf
  function new(int maxd, int nfeat, bit cls, int ncls, int leaf_pct = 20);
    for (int i = 0; i < HEAP; i++) begin
      int d;
      d = $clog2(i + 2) - 1;
      used[i] = (i == 0) ? 1'b1 : (used[(i - 1) / 2] && !leaf[(i - 1) / 2]);
      leaf[i] = (d >= maxd) || (d >= 1 && $urandom_range(0, 99) < leaf_pct);
      feat[i] = 5'($urandom_range(0, nfeat - 1));
      thr[i]  = rand_h();
      if (cls) res[i] = 14'($urandom_range(0, ncls - 1));
      else     res[i] = {1'($urandom), 5'($urandom_range(1, 30)), 8'($urandom)};
    end
  endfunction

  // pre-order addresses from `b`; returns the number of nodes
  function int layout(int b);
    int pending[$];
    int a;
    base = b;
    a = b;
    pending.push_back(0);
    while (pending.size() > 0) begin
      int i;
      i = pending.pop_back();
      addr[i] = a;
      a++;
      if (!leaf[i]) begin
        pending.push_back(2 * i + 2);
        pending.push_back(2 * i + 1);
      end
    end
    size = a - b;
    return size;
  endfunction

  // node words into img; next_base < 0 marks the last tree of a subset
  function void emit(ref logic [31:0] img [], input int next_base);
    for (int i = 0; i < HEAP; i++) if (used[i]) begin
      if (leaf[i]) begin
        if (next_base < 0) img[addr[i]] = {14'd0, 2'b00, res[i], 1'b1, 1'b1};
        else img[addr[i]] = {14'(next_base - addr[i]), 2'b00, res[i], 1'b0, 1'b1};
      end else
        img[addr[i]] = {10'(addr[2 * i + 2] - addr[i]), feat[i], thr[i], 1'b0};
    end
  endfunction

  // reference walk: returns nodes visited, leaf result in r
  function int walk(logic [15:0] f [32], output logic [13:0] r);
    int i, n;
    i = 0; n = 1;
    while (!leaf[i]) begin
      if (h2r(f[feat[i]]) <= h2r(thr[i])) i = 2 * i + 1;
      else i = 2 * i + 2;
      n++;
    end
    r = res[i];
    return n;
  endfunction
endclass

// Lays the trees out for one DTU: tree t goes to subset t % 5, headers at
// words 0..4 (unused headers hold random words), subsets contiguous after.
// Returns the number of words used.
function automatic int build_image(Tree trees [$], ref logic [31:0] img []);
  int a, ns;
  int sub [5][$];
  foreach (trees[t]) sub[t % 5].push_back(t);
  ns = (trees.size() < 5) ? trees.size() : 5;
  for (int k = 0; k < 5; k++) img[k] = $urandom;
  a = 5;
  for (int k = 0; k < ns; k++) begin
    img[k] = {31'(a), (k == ns - 1)};
    foreach (sub[k][j]) a += trees[sub[k][j]].layout(a);
  end
  for (int k = 0; k < ns; k++)
    foreach (sub[k][j]) begin
      Tree t;
      t = trees[sub[k][j]];
      t.emit(img, (j == sub[k].size() - 1) ? -1 : t.base + t.size);
    end
  return a;
endfunction

// Expected cycles from the DTU start pulse to its done pulse, and the leaf
// results the walk produces (appended to `leaves`).
function automatic int expect_run(Tree trees [$], logic [15:0] f [32], ref logic [13:0] leaves [$]);
  int visits [5];
  int worst, ns;
  logic [13:0] r;
  for (int k = 0; k < 5; k++) visits[k] = 0;
  foreach (trees[t]) begin
    visits[t % 5] += trees[t].walk(f, r);
    leaves.push_back(r);
  end
  ns = (trees.size() < 5) ? trees.size() : 5;
  worst = 0;
  for (int k = 0; k < 5; k++) begin
    int c;
    c = (k < ns) ? 7 + k + 5 * visits[k] : 7 + k;
    if (c > worst) worst = c;
  end
  return worst;
endfunction
