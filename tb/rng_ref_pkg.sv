// rng_ref_pkg: reference model of the generator's output stream, for the
// end-to-end testbenches. It is written from the behaviour, not from the RTL:
//  - conditioned word k = XOR of stored cell words N*k .. N*k+N-1 (modulo the
//    memory depth),
//  - seed = that word, tap row = bits [23,10,2], TR = bits
//    [22,20,18,16,12,10,6,4,2,0], taps as listed in the tap table,
//  - the LFSR shifts right and the XOR of the tapped bits enters at bit 31,
//  - a seed lasts max(TR, N+3) output words: TR when the next conditioned
//    word is ready in time, N+3 (the conditioner's turnaround) otherwise.
package rng_ref_pkg;

  class stream_ref;
    int unsigned    n_words;
    int unsigned    depth;
    logic [31:0]    image [];   // what the testbench stored in the memory

    // state of the stream
    bit             started;
    logic [31:0]    cur;
    int unsigned    row;
    int unsigned    tr;
    int unsigned    run_len;
    int unsigned    next_k;

    // what happened
    int unsigned    outputs;
    int unsigned    reseeds;
    int unsigned    ontime;
    int unsigned    late;
    int unsigned    tr_zero;
    int unsigned    row_seen [8];
    int unsigned    wraps;      // seeds built from words read after the address wrapped
    int unsigned    errors;

    static int unsigned pos [8][4] = '{
      '{31, 30, 28, 0}, '{31, 30, 4, 3}, '{31, 29, 7, 2}, '{31, 29, 6, 3},
      '{31, 28, 5, 4},  '{31, 28, 5, 3}, '{31, 25, 14, 6}, '{31, 30, 15, 1}
    };

    function new(int unsigned n_words, int unsigned depth);
      this.n_words = n_words;
      this.depth   = depth;
      image        = new[depth];
      foreach (image[i]) image[i] = '0;
    endfunction

    function logic [31:0] cond(int unsigned k);
      logic [31:0] w;
      w = '0;
      for (int unsigned i = 0; i < n_words; i++)
        w ^= image[(k * n_words + i) % depth];
      return w;
    endfunction

    static function int unsigned tr_of(logic [31:0] w);
      return 32'({w[22], w[20], w[18], w[16], w[12], w[10], w[6], w[4], w[2], w[0]});
    endfunction

    static function int unsigned row_of(logic [31:0] w);
      return 32'({w[23], w[10], w[2]});
    endfunction

    static function logic [31:0] step(logic [31:0] s, int unsigned r);
      logic fb;
      fb = 1'b0;
      for (int k = 0; k < 4; k++) fb ^= s[pos[r][k]];
      return {fb, s[31:1]};
    endfunction

    local function void start_seed();
      logic [31:0] w;
      w   = cond(next_k);
      if ((next_k + 1) * n_words > depth) wraps++;
      cur = w;
      row = row_of(w);
      tr  = tr_of(w);
      run_len = 1;
      next_k++;
      reseeds++;
      row_seen[row]++;
      if (tr == 0) tr_zero++;
    endfunction

    // Feed one valid output word; returns 1 if it matches.
    function bit push(logic [31:0] v);
      logic [31:0] exp;
      int unsigned life;
      outputs++;
      if (!started) begin
        started = 1;
        start_seed();
        exp = cur;
      end else begin
        life = (tr > n_words + 3) ? tr : n_words + 3;
        if (run_len < life) begin
          cur = step(cur, row);
          run_len++;
          exp = cur;
        end else begin
          if (tr >= n_words + 3) ontime++;
          else late++;
          start_seed();
          exp = cur;
        end
      end
      if (v !== exp) begin
        errors++;
        if (errors < 10)
          $display("output %0d: %0d expected %0d (seed %0d, word %0d of run)",
                   outputs, v, exp, next_k - 1, run_len);
        return 0;
      end
      return 1;
    endfunction
  endclass

endpackage
