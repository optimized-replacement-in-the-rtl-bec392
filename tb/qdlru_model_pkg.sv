// qdlru_model_pkg: reference models used by the testbenches.
//
// qdlru_model is an untimed model of the configuration layer lookup and
// qdLRU replacement. It keeps the replacement order as a list of layer
// numbers (front = most recently used), independent of the rank counters of
// the RTL. It classifies each access as loop hit, layer hit or miss exactly as
// the layer controller is specified to do.
//
// qdlru_marker is the software side of qdLRU: from a trace of configuration
// start addresses it builds the configuration lines (approximated working
// sets) and chooses which configurations to flag as drop-quickly so that
// every line, minus its flagged members, fits into the layers. A repeated
// configuration closes the current line and starts the next one with itself.
package qdlru_model_pkg;

  typedef enum int {M_LOOP = 0, M_LAYER = 1, M_MISS = 2} m_kind_e;

  class qdlru_model;
    int          layers;
    bit          qd_mode;
    bit          valid[];
    bit          mark[];
    longint      tag[];
    int          order[$];
    bit          last_valid;
    longint      last_addr;
    int          active;

    function new(int layers, bit qd_mode);
      this.layers  = layers;
      this.qd_mode = qd_mode;
      valid = new[layers];
      mark  = new[layers];
      tag   = new[layers];
      reset();
    endfunction

    function void reset();
      order.delete();
      for (int l = 0; l < layers; l++) begin
        valid[l] = 0; mark[l] = 0; tag[l] = 0;
        order.push_back(l);
      end
      last_valid = 0; last_addr = 0; active = 0;
    endfunction

    function void move(int l, bit to_back);
      foreach (order[i]) if (order[i] == l) begin order.delete(i); break; end
      if (to_back) order.push_back(l); else order.push_front(l);
    endfunction

    function void access(longint addr, bit drop, output m_kind_e kind,
                         output int layer, output bit evict, output bit quick);
      int hit = -1;
      evict = 0; quick = 0;
      if (last_valid && last_addr == addr) begin
        kind = M_LOOP; layer = active;
      end else begin
        for (int l = 0; l < layers; l++) if (valid[l] && tag[l] == addr) hit = l;
        if (hit >= 0) begin
          kind = M_LAYER; layer = hit; quick = mark[hit];
          if (qd_mode || !mark[hit]) move(hit, 0);
        end else begin
          int v = -1;
          for (int l = layers - 1; l >= 0; l--) if (!valid[l]) v = l;
          if (v < 0 && qd_mode)
            for (int i = order.size() - 1; i >= 0 && v < 0; i--)
              if (mark[order[i]]) v = order[i];
          if (v < 0) v = order[$];
          kind = M_MISS; layer = v; evict = valid[v]; quick = drop;
          valid[v] = 1; tag[v] = addr; mark[v] = drop;
          move(v, !qd_mode && drop);
        end
        active = layer;
      end
      last_valid = 1; last_addr = addr;
    endfunction
  endclass

  class qdlru_marker;
    typedef longint line_t[$];
    line_t  lines[$];
    int     counts[$];
    bit     marked[longint];

    static function bit in_line(input line_t ln, longint a);
      foreach (ln[i]) if (ln[i] == a) return 1;
      return 0;
    endfunction

    static function bit same_line(input line_t a, input line_t b);
      if (a.size() != b.size()) return 0;
      foreach (a[i]) if (a[i] != b[i]) return 0;
      return 1;
    endfunction

    function void add_line(line_t ln);
      foreach (lines[i]) if (same_line(lines[i], ln)) begin counts[i]++; return; end
      lines.push_back(ln);
      counts.push_back(1);
    endfunction

    // Configuration lines with their usage counters.
    function void build_lines(longint trace[$]);
      line_t  cur;
      bit     have_last = 0;
      longint last = 0;
      foreach (trace[k]) begin
        longint item = trace[k];
        if (have_last && item == last) begin
          // repeated execution of the current configuration
        end else if (!in_line(cur, item)) begin
          cur.push_back(item);
        end else begin
          add_line(cur);
          cur.delete();
          cur.push_back(item);
        end
        last = item; have_last = 1;
      end
      if (cur.size() > 0) add_line(cur);
    endfunction

    function int unmarked_len(int li);
      int n = 0;
      foreach (lines[li][j]) if (!marked.exists(lines[li][j])) n++;
      return n;
    endfunction

    // Choose drop-quickly configurations until every line fits.
    function void select_marks(int layers);
      bit is_long[$];
      foreach (lines[i]) is_long.push_back(lines[i].size() >= layers);
      forever begin
        int  li = -1;
        int  best_use;
        longint best;
        bit  found = 0;
        foreach (is_long[i]) if (is_long[i] && li < 0) li = i;
        if (li < 0) break;
        foreach (lines[li][j]) begin
          longint c = lines[li][j];
          int usage = 0;
          if (marked.exists(c)) continue;
          foreach (lines[s]) if (!is_long[s] && in_line(lines[s], c)) usage += counts[s];
          if (!found || usage < best_use) begin found = 1; best_use = usage; best = c; end
        end
        if (found) marked[best] = 1;
        foreach (lines[i])
          if (is_long[i] && (unmarked_len(i) < layers || !found)) is_long[i] = 0;
      end
    endfunction

    function bit is_marked(longint a);
      return marked.exists(a);
    endfunction
  endclass

endpackage
