// Reference model of the greedy Interval-Table update, for the testbenches.
//
// Written independently of the RTL as plain list operations on a sorted
// queue of intervals: find the line, measure the gaps, then extend, insert,
// or merge the closest pair and insert. Gaps are counted as the number of
// non-updated lines between two positions. Decision rules (the same contract
// the hardware implements):
//   - a line inside an interval changes nothing (HIT);
//   - local gap 0, or a full table with local gap <= smallest global gap:
//     extend the nearest interval (left one on a tie) (EXTEND);
//   - otherwise, with a free entry: store the line as (line, line) (INSERT);
//   - otherwise merge the leftmost closest pair, then insert the line (MERGE).
// ref_update also returns how many intervals the hardware has to move and
// the number of cycles the update takes after the line leaves the buffer.
package greedy_ref_pkg;

  typedef struct {
    int s;
    int e;
  } iv_t;

  typedef enum int {K_HIT = 0, K_EXTEND = 1, K_INSERT = 2, K_MERGE = 3} kind_e;

  function automatic kind_e ref_update(ref iv_t q[$], input int line, input int k,
                                       output int moves, output int cycles);
    int   n, p, min_local, ext, min_global, g, left, right;
    iv_t  m;
    n      = q.size();
    moves  = 0;
    for (int i = 0; i < n; i++) begin
      if (line >= q[i].s && line <= q[i].e) begin
        cycles = i + 1;
        return K_HIT;
      end
    end
    p = 0;
    while (p < n && q[p].s < line) p++;
    min_local = 1 << 30;
    ext = 0;
    if (p > 0) begin
      left = line - q[p-1].e - 1;
      min_local = left;
      ext = p - 1;
    end
    if (p < n) begin
      right = q[p].s - line - 1;
      if (right < min_local) begin
        min_local = right;
        ext = p;
      end
    end
    min_global = 1 << 30;
    g = 0;
    for (int i = 0; i + 1 < n; i++) begin
      if (q[i+1].s - q[i].e - 1 < min_global) begin
        min_global = q[i+1].s - q[i].e - 1;
        g = i;
      end
    end
    if (n > 0 && (min_local == 0 || (n == k && min_local <= min_global))) begin
      if (line < q[ext].s) q[ext].s = line;
      if (line > q[ext].e) q[ext].e = line;
      cycles = n + 1;
      return K_EXTEND;
    end
    if (n < k) begin
      moves = n - p;
      q.insert(p, '{s: line, e: line});
      cycles = n + 1 + moves + 1;
      return K_INSERT;
    end
    m.s = q[g].s;
    m.e = q[g+1].e;
    moves = (p >= g + 2) ? (p - g - 2) : (g - p);
    q.delete(g + 1);
    q[g] = m;
    p = 0;
    while (p < q.size() && q[p].s < line) p++;
    q.insert(p, '{s: line, e: line});
    cycles = n + 2 + moves + 1;
    return K_MERGE;
  endfunction

  // number of lines covered by the intervals
  function automatic int ref_covered(ref iv_t q[$]);
    int c = 0;
    foreach (q[i]) c += q[i].e - q[i].s + 1;
    return c;
  endfunction

endpackage
