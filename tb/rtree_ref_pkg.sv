// rtree_ref_pkg: reference model used by the testbenches.
//
// Builds spatially coherent random 2DR-trees and searches them in plain
// integer arithmetic, independently of the RTL. A tree of height H covers a
// square of side 4096; a node's ORDER_X*ORDER_Y locations split its square
// into equal cells (location k: column k % ORDER_X, row k / ORDER_X), a leaf
// location holds a small object rectangle inside its cell, and a non-leaf
// location holds the bounding box of its child node's occupied locations.
// Some locations are left empty. Nodes are numbered breadth-first; node n's
// location k points to node FANOUT*n+1+k, and that index is also stored as
// the pointer of non-leaf locations. Leaf pointers are object numbers.
package rtree_ref_pkg;
  import rtree_pkg::*;

  typedef node_entry_t tree_t[];

  function automatic int ref_nodes(int h);
    int n = 0, w = 1;
    for (int l = 0; l < h; l++) begin n += w; w *= FANOUT; end
    return n;
  endfunction

  function automatic int ref_leaves(int h);
    int w = 1;
    for (int l = 1; l < h; l++) w *= FANOUT;
    return w;
  endfunction

  function automatic bit ref_overlap(mbr_t a, mbr_t b);
    int axl = int'(a.xlo), axh = int'(a.xhi), ayl = int'(a.ylo), ayh = int'(a.yhi);
    int bxl = int'(b.xlo), bxh = int'(b.xhi), byl = int'(b.ylo), byh = int'(b.yhi);
    return !(axh < bxl || bxh < axl || ayh < byl || byh < ayl);
  endfunction

  // Fill node n (covering the square at x0,y0 of side `side`) and its subtree.
  // Returns 1 if any location of the node is occupied, and the node's
  // bounding box in bb.
  function automatic bit fill(ref tree_t t, input int n, input int level, input int h,
                              input int x0, input int y0, input int side,
                              input int empty_pct, ref int next_obj, output mbr_t bb);
    int cw = side / ORDER_X;
    int ch = side / ORDER_Y;
    bit any = 0;
    mbr_t cbb;
    t[n] = '0;
    t[n].leaf = (level == h - 1);
    for (int k = 0; k < FANOUT; k++) begin
      int cx = x0 + (k % ORDER_X) * cw;
      int cy = y0 + (k / ORDER_X) * ch;
      if (level == h - 1) begin
        if ($urandom_range(0, 99) >= empty_pct) begin
          int w = $urandom_range(0, cw - 1);
          int hh = $urandom_range(0, ch - 1);
          int ox = cx + $urandom_range(0, cw - 1 - w);
          int oy = cy + $urandom_range(0, ch - 1 - hh);
          t[n].loc[k].valid   = 1'b1;
          t[n].loc[k].mbr.xlo = coord_t'(ox);
          t[n].loc[k].mbr.ylo = coord_t'(oy);
          t[n].loc[k].mbr.xhi = coord_t'(ox + w);
          t[n].loc[k].mbr.yhi = coord_t'(oy + hh);
          t[n].loc[k].ptr     = ptr_t'(32'h8000 + next_obj);
          next_obj++;
        end
      end else begin
        int c = FANOUT * n + 1 + k;
        if (fill(t, c, level + 1, h, cx, cy, cw, empty_pct, next_obj, cbb)) begin
          t[n].loc[k].valid = 1'b1;
          t[n].loc[k].mbr   = cbb;
          t[n].loc[k].ptr   = ptr_t'(c);
        end
      end
      if (t[n].loc[k].valid) begin
        if (!any) bb = t[n].loc[k].mbr;
        else begin
          if (t[n].loc[k].mbr.xlo < bb.xlo) bb.xlo = t[n].loc[k].mbr.xlo;
          if (t[n].loc[k].mbr.ylo < bb.ylo) bb.ylo = t[n].loc[k].mbr.ylo;
          if (t[n].loc[k].mbr.xhi > bb.xhi) bb.xhi = t[n].loc[k].mbr.xhi;
          if (t[n].loc[k].mbr.yhi > bb.yhi) bb.yhi = t[n].loc[k].mbr.yhi;
        end
        any = 1;
      end
    end
    return any;
  endfunction

  function automatic void gen_tree(ref tree_t t, input int h, input int empty_pct);
    int next_obj = 0;
    mbr_t bb;
    bit any;
    t = new[ref_nodes(h)];
    any = fill(t, 0, 0, h, 0, 0, 4096, empty_pct, next_obj, bb);
  endfunction

  function automatic mbr_t rand_query(int max_side);
    mbr_t q;
    int w = $urandom_range(0, max_side);
    int hh = $urandom_range(0, max_side);
    int x = $urandom_range(0, 4095 - w);
    int y = $urandom_range(0, 4095 - hh);
    q.xlo = coord_t'(x);
    q.ylo = coord_t'(y);
    q.xhi = coord_t'(x + w);
    q.yhi = coord_t'(y + hh);
    return q;
  endfunction

  // Expected leaf-level result bits of the complete-tree search:
  // exp[j*FANOUT+k] for leaf node j, location k.
  function automatic void ref_search(ref tree_t t, input int h, input mbr_t q, ref bit exp[]);
    int nn = ref_nodes(h);
    int nl = ref_leaves(h);
    bit pass[] = new[nn * FANOUT];
    exp = new[nl * FANOUT];
    for (int n = 0; n < nn; n++) begin
      for (int k = 0; k < FANOUT; k++) begin
        bit par = (n == 0) ? 1'b1 : pass[((n - 1) / FANOUT) * FANOUT + (n - 1) % FANOUT];
        pass[n * FANOUT + k] = par && t[n].loc[k].valid && ref_overlap(t[n].loc[k].mbr, q);
      end
    end
    for (int j = 0; j < nl; j++)
      for (int k = 0; k < FANOUT; k++)
        exp[j * FANOUT + k] = pass[(nn - nl + j) * FANOUT + k] && t[nn - nl + j].leaf;
  endfunction

  // Brute-force set of objects whose rectangle overlaps q (pointer values).
  function automatic void ref_brute(ref tree_t t, input mbr_t q, ref int found[$]);
    found.delete();
    foreach (t[n])
      if (t[n].leaf)
        for (int k = 0; k < FANOUT; k++)
          if (t[n].loc[k].valid && ref_overlap(t[n].loc[k].mbr, q))
            found.push_back(int'(t[n].loc[k].ptr));
    found.sort();
  endfunction
endpackage
