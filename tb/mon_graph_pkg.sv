// mon_graph_pkg -- testbench-side generator of monitoring graphs.
//
// Class mon_graph #(H, OFF_W) builds a random deterministic monitoring graph
// the way an offline analysis of a packet processing binary would present it
// to a monitor with an H-bit hash and an OFF_W-bit offset field, and lays it
// out in the monitor's memory format:
//   * nstates instruction states, each with a random 32-bit instruction word.
//     Most fall through to the next state; some branch to 2-5 targets, a few
//     fan out to up to 2**H (subroutine returns with many call sites). State
//     7 always has 2**H successors. The successors of a state have distinct
//     hashes, as after NFA-to-DFA conversion.
//   * one extra state (index nstates) stands before the first instruction and
//     leads to state 0; its row is the start row.
//   * layout: group g holds, for every state with g successors, a set of g
//     consecutive rows, one per successor, ordered by hash; groups are placed
//     1..2**H in order and the start row follows them. A row holds
//     {g of that state modulo 2**H, its set index, its one-hot hash vector}.
//     Unused rows get random words.
// The hash reference here sums the hex digits of the printed instruction
// word, independently of the RTL's bit slicing, and keeps the low H bits.
package mon_graph_pkg;

  class mon_graph #(int H = 4, int OFF_W = 12);
    localparam int NV    = 1 << H;
    localparam int ROW_W = H + OFF_W + NV;
    int          nstates;
    int          maxrows;
    logic [31:0] word[];
    int          hsh[];
    int          succ[][$];
    int          setidx[];
    int          nsets[NV+1];
    int          base[NV+1];
    int          start_row;
    int          nrows;
    logic [ROW_W-1:0] image[];

    static function int ref_hash(logic [31:0] w);
      string s;
      int sum = 0;
      s = $sformatf("%08h", w);
      for (int i = 0; i < 8; i++) begin
        byte c = s[i];
        sum += (c >= "a") ? (int'(c) - int'("a") + 10) : (int'(c) - int'("0"));
      end
      return sum % NV;
    endfunction

    function int fanout(int s);
      return succ[s].size();
    endfunction

    function logic [NV-1:0] hvec(int s);
      logic [NV-1:0] v = '0;
      foreach (succ[s][i]) v[hsh[succ[s][i]]] = 1'b1;
      return v;
    endfunction

    function logic [ROW_W-1:0] row_word(int s);
      return {H'(fanout(s) % NV), OFF_W'(setidx[s]), hvec(s)};
    endfunction

    // row holding successor number r of state s
    function int row_of(int s, int r);
      int g = fanout(s);
      return base[g] + g * setidx[s] + r;
    endfunction

    // index of the successor of s whose hash is h, -1 if none
    function int succ_with_hash(int s, int h);
      foreach (succ[s][i]) if (hsh[succ[s][i]] == h) return i;
      return -1;
    endfunction

    function new(int n, int rows);
      int bucket[NV][$];
      int rows_left;
      nstates = n;
      maxrows = rows;
      word   = new[n + 1];
      hsh    = new[n + 1];
      succ   = new[n + 1];
      setidx = new[n + 1];
      image  = new[rows];
      for (int s = 0; s < n; s++) begin
        word[s] = $urandom();
        hsh[s]  = ref_hash(word[s]);
        bucket[hsh[s]].push_back(s);
      end
      word[n] = '0;
      hsh[n]  = 0;
      rows_left = rows - 1 - n - 40;
      for (int s = 0; s < n; s++) begin
        int g, pick, t;
        bit used[NV];
        foreach (used[i]) used[i] = 0;
        pick = $urandom() % 100;
        if (s == 7)         g = NV;
        else if (pick < 80) g = 1;
        else if (pick < 93) g = 2;
        else if (pick < 98) g = 2 + ($urandom() % 4);
        else                g = 6 + ($urandom() % (NV - 5));
        if (g > NV) g = NV;
        if (g - 1 > rows_left) g = 1;
        rows_left -= g - 1;
        t = (s + 1) % n;
        succ[s].push_back(t);
        used[hsh[t]] = 1;
        while (succ[s].size() < g) begin
          int h;
          h = $urandom() % NV;
          if (!used[h] && bucket[h].size() > 0) begin
            used[h] = 1;
            succ[s].push_back(bucket[h][$urandom() % bucket[h].size()]);
          end
        end
        succ[s].sort() with (hsh[item]);
      end
      succ[n].push_back(0);
      foreach (nsets[g]) nsets[g] = 0;
      for (int s = 0; s <= n; s++) begin
        int g;
        g = fanout(s);
        setidx[s] = nsets[g];
        nsets[g]++;
      end
      base[0] = 0;
      base[1] = 0;
      for (int g = 2; g <= NV; g++) base[g] = base[g-1] + (g-1) * nsets[g-1];
      nrows = base[NV] + NV * nsets[NV];
      start_row = nrows;
      if (nrows + 1 > rows) $fatal(1, "graph needs %0d rows", nrows + 1);
      foreach (nsets[g]) if (nsets[g] > (1 << OFF_W)) $fatal(1, "group %0d has too many sets", g);
      for (int r = 0; r < rows; r++) image[r] = ROW_W'({$urandom(), $urandom()});
      for (int s = 0; s <= n; s++)
        foreach (succ[s][i]) image[row_of(s, i)] = row_word(succ[s][i]);
      image[start_row] = row_word(n);
    endfunction

  endclass

endpackage
