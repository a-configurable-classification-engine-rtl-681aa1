// Testbench-side table builder: builds 16-way tries from prefix lists and lays them
// out as the engine's memory images, the way control software would.
//
// Build: prefixes are inserted in order of increasing length. The walk consumes one
// key nibble per level; a leaf on the way is turned into an internal node whose 16
// children inherit its value (leaf pushing), and a prefix that ends inside a nibble is
// expanded over all children sharing its leading bits. Every internal node therefore
// has 16 children and every leaf carries the value of its longest matching prefix.
// Layout: a breadth-first walk gives each internal node a word in the stage that owns
// its level; the internal children of a word get consecutive words (child_base = the
// first) and its leaf children consecutive leaf indices (leaf_base = the first).
// A trie's root word is given by the caller, which is how destination tries are
// placed at word <source leaf index> of their stage.
package trie_image_pkg;
  import cls_pkg::*;

  class trie_image;
    // node pool
    bit is_int [int];
    int val    [int];
    int kid    [int];          // node*16 + nibble -> child node
    int n_nodes;
    // memory images
    trie_word_t img [int];     // stage*65536 + word -> contents
    int         leafval [int]; // leaf index -> value
    int         leafcnt;       // leaves laid out so far
    int         alloc [4];     // next free word per stage
    int         wordof [int];  // internal node -> its word

    function new();
      n_nodes = 0;
      leafcnt = 0;
      foreach (alloc[i]) alloc[i] = 0;
    endfunction

    function int new_node(bit internal, int v);
      int id;
      id = n_nodes;
      n_nodes++;
      is_int[id] = internal;
      val[id]    = v;
      return id;
    endfunction

    function void split(int n);
      is_int[n] = 1;
      for (int i = 0; i < 16; i++) kid[n*16+i] = new_node(0, val[n]);
    endfunction

    // New trie whose every address maps to dflt.
    function int new_trie(int dflt);
      int r;
      r = new_node(0, dflt);
      split(r);
      return r;
    endfunction

    // key left-aligned in 128 bits; prefixes must come in order of increasing length
    function void insert(int root, logic [127:0] key, int len, int v);
      int node, full, rem;
      node = root;
      full = len / 4;
      rem  = len % 4;
      for (int i = 0; i < full; i++) begin
        int nib, c;
        nib = int'(key[127-4*i -: 4]);
        c   = kid[node*16+nib];
        if (i == full-1 && rem == 0) begin
          if (!is_int[c]) val[c] = v;
          return;
        end
        if (!is_int[c]) split(c);
        node = c;
      end
      begin
        int top, c;
        top = int'(key[127-4*full -: 4]) & ~((1 << (4-rem)) - 1);
        for (int j = 0; j < (1 << (4-rem)); j++) begin
          c = kid[node*16 + (top | j)];
          if (!is_int[c]) val[c] = v;
        end
      end
    endfunction

    // Walk the built trie: returns the leaf value and the level the leaf was found at.
    function int walk(int root, logic [127:0] key, output int level);
      int node;
      node = root;
      for (int d = 0; d < 32; d++) begin
        int c;
        c = kid[node*16 + int'(key[127-4*d -: 4])];
        if (!is_int[c]) begin
          level = d;
          return val[c];
        end
        node = c;
      end
      level = 31;
      return -1;
    endfunction

    // Internal node reached after d levels of the walk (-1 if a leaf comes first).
    function int node_at(int root, logic [127:0] key, int d);
      int node;
      node = root;
      for (int i = 0; i < d; i++) begin
        node = kid[node*16 + int'(key[127-4*i -: 4])];
        if (!is_int[node]) return -1;
      end
      return node;
    endfunction

    // Lay out a trie; returns the leaf index of its first leaf.
    function int emit(int root, bit cls, bit ipv6, bit trie, int root_word);
      int q_node [$];
      int q_dep  [$];
      int q_word [$];
      int first;
      first = leafcnt;
      begin
        int st0;
        st0 = int'(stage_of(cls, ipv6, trie, 5'd0));
        if (alloc[st0] <= root_word) alloc[st0] = root_word + 1;
      end
      q_node.push_back(root);
      q_dep.push_back(0);
      q_word.push_back(root_word);
      while (q_node.size() > 0) begin
        int n, d, w, st, stc;
        logic [15:0] b;
        trie_word_t tw;
        n   = q_node.pop_front();
        d   = q_dep.pop_front();
        w   = q_word.pop_front();
        st  = int'(stage_of(cls, ipv6, trie, 5'(d)));
        stc = int'(stage_of(cls, ipv6, trie, 5'(d+1)));
        b             = '0;
        tw.child_base = WORD_AW'(alloc[stc]);
        tw.leaf_base  = LEAF_W'(leafcnt);
        for (int i = 0; i < 16; i++) begin
          int c;
          c = kid[n*16+i];
          if (is_int[c]) begin
            b = b | (16'd1 << i);
            q_node.push_back(c);
            q_dep.push_back(d+1);
            q_word.push_back(alloc[stc]);
            alloc[stc]++;
          end else begin
            leafval[leafcnt] = val[c];
            leafcnt++;
          end
        end
        tw.bits    = b;
        img[st*65536 + w] = tw;
        wordof[n]  = w;
      end
      return first;
    endfunction
  endclass

endpackage
