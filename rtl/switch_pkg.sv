// switch_pkg: types and topology functions shared by the event switch.
//
// A package is the unit that moves through the switch: the index of the
// input it came from, its weight (how many link clocks it occupies on a
// high-speed link, one weight unit per clock) and a tag carrying the payload.
//
// The topology functions place the nodes of the triangular network on a
// grid. Rows grow downwards, columns to the right; a node's "vertical"
// output goes one row down, its "horizontal" output one column right.
//   * Merge column: NI-1 nodes at (r, 0), r = 0 .. NI-2. Inputs enter here.
//   * Output row:   NO nodes at (NI-1, c); node c drives link c.
//   * Triangle:     the remaining nodes fill the space between the merge
//                   column and the output row, one anti-diagonal after the
//                   other, starting at the corner (bottom left); inside a
//                   diagonal the lowest cell is filled first, so every
//                   placed node has a node (or a link) below it.
// With no triangle nodes the grid degenerates into the plain chain
// (merge column followed by the output row).
// The L-shaped chain and the triangle grown from its bottom-left corner
// follow the switch concept; the field widths, the node numbering and the
// fill order inside a diagonal are choices of this implementation.
package switch_pkg;

  parameter int unsigned WEIGHT_W = 4;   // weights 1 .. 15
  parameter int unsigned SRC_W    = 4;   // up to 16 inputs
  parameter int unsigned TAG_W    = 16;  // payload / sequence tag

  typedef logic [WEIGHT_W-1:0] weight_t;

  typedef struct packed {
    logic [SRC_W-1:0] src;
    weight_t          weight;
    logic [TAG_W-1:0] tag;
  } pkt_t;

  // Number of triangle cells available for a given number of inputs and
  // outputs: diagonal d (d = 0 .. NO-2) holds min(d+1, NI-1) cells.
  function automatic int max_extra(int ni, int no);
    int n;
    n = 0;
    for (int d = 0; d < no - 1; d++)
      n += (d + 1 < ni - 1) ? d + 1 : ni - 1;
    return n;
  endfunction

  // Grid cell of triangle node e (0-based); sel=0 gives the row, 1 the column.
  function automatic int extra_cell(int e, int ni, int no, bit sel);
    int rows, cnt, res;
    rows = ni - 1;
    cnt  = 0;
    res  = -1;
    for (int d = 0; d < no - 1; d++) begin
      for (int t = 0; t <= d; t++) begin
        if (rows - 1 - t >= 0) begin
          if (cnt == e) res = sel ? (1 + d - t) : (rows - 1 - t);
          cnt++;
        end
      end
    end
    return res;
  endfunction

  // Node numbering: merge nodes first, then output nodes, then triangle nodes.
  function automatic int node_row(int i, int ni, int no);
    if (i < ni - 1)       return i;
    if (i < ni - 1 + no)  return ni - 1;
    return extra_cell(i - (ni - 1) - no, ni, no, 1'b0);
  endfunction

  function automatic int node_col(int i, int ni, int no);
    if (i < ni - 1)       return 0;
    if (i < ni - 1 + no)  return i - (ni - 1);
    return extra_cell(i - (ni - 1) - no, ni, no, 1'b1);
  endfunction

  // Index of the node at grid cell (r, c), or -1 if the cell is empty.
  function automatic int node_at(int r, int c, int ni, int no, int nn);
    int res;
    res = -1;
    for (int i = 0; i < nn; i++)
      if (node_row(i, ni, no) == r && node_col(i, ni, no) == c) res = i;
    return res;
  endfunction

endpackage
