// Helpers shared by the system-level testbenches: random sparse vectors,
// the reference dot product, and the channel each reference vector reaches
// through a (cascaded) splitter in SPLIT_VEC mode.
// (sw, the splitter width, does not change the mapping; it is kept so the
// call names the configuration.)
package tb_sva_pkg;

  // Sorted unique IDs below max_id, about density percent of them, at most
  // max_len, at least one, with random 16-bit values.
  function automatic void gen_vec(input int max_id, input int max_len, input int density,
                                  output int ids [$], output int vals [$]);
    ids.delete();
    vals.delete();
    for (int id = 0; id < max_id && ids.size() < max_len; id++)
      if ($urandom_range(999) < density * 10) begin
        ids.push_back(id);
        vals.push_back(int'($urandom_range(65535)));
      end
    if (ids.size() == 0) begin
      ids.push_back(int'($urandom_range(max_id - 1)));
      vals.push_back(int'($urandom_range(65535)));
    end
  endfunction

  // Sum of value products over IDs present in both vectors.
  function automatic longint unsigned dot(input int aid [$], input int av [$],
                                          input int bid [$], input int bv [$]);
    longint unsigned s = 0;
    int i = 0, j = 0;
    while (i < aid.size() && j < bid.size()) begin
      if (aid[i] == bid[j]) begin
        s += longint'(av[i]) * longint'(bv[j]);
        i++; j++;
      end else if (aid[i] < bid[j]) i++;
      else j++;
    end
    return s;
  endfunction

  // Channel that reference vector k (k = 0 .. nvec-1 after a restart)
  // reaches through a splitter in SPLIT_VEC mode: the k-th enabled channel
  // counted from channel 0, wrapping round.
  function automatic void split_map(input logic [511:0] en, input int n, input int sw,
                                    input int nvec, output int map [$]);
    int chs [$];
    map.delete();
    for (int c = 0; c < n; c++) if (en[c]) chs.push_back(c);
    for (int k = 0; k < nvec; k++) map.push_back(chs[k % chs.size()]);
  endfunction

endpackage
