// tb_util_pkg: reference models shared by the testbenches.
//   * levinson: floating-point Levinson-Durbin recursion (order <= 127),
//     sign convention of the design: k_i = -(sum_j a_j r_{i-j}) / E_{i-1}.
//   * rat_real: value of a rational fraction.
//   * ar2_next: a second-order autoregressive test signal driven by
//     uniform pseudo-random noise, x(n) = 1.2 x(n-1) - 0.6 x(n-2) + w(n).
//     Its reflection coefficients are k_1 = -0.75, k_2 = 0.6, k_i = 0 beyond.
package tb_util_pkg;
  import ar_pkg::*;

  localparam int MAXP = 127;
  typedef real rvec_t [MAXP+1];

  function automatic real rat_real(input rat_t v);
    return real'(v.n) / real'(v.d);
  endfunction

  function automatic void levinson(input int p, input rvec_t r,
                                   output rvec_t k, output rvec_t a);
    rvec_t an;
    real e, s;
    for (int i = 0; i <= MAXP; i++) begin
      k[i] = 0.0; a[i] = 0.0; an[i] = 0.0;
    end
    a[0] = 1.0;
    e = r[0];
    for (int i = 1; i <= p; i++) begin
      s = 0.0;
      for (int j = 0; j < i; j++) s += a[j] * r[i-j];
      k[i] = -s / e;
      for (int j = 0; j <= p; j++) an[j] = a[j];
      an[i] = k[i];
      for (int j = 1; j < i; j++) an[j] = a[j] + k[i] * a[i-j];
      for (int j = 0; j <= p; j++) a[j] = an[j];
      e = (1.0 - k[i] * k[i]) * e;
    end
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // one step of the AR(2) test signal; amp is the noise amplitude
  function automatic real ar2_next(input real x1, input real x2, input int amp);
    int w;
    w = int'($urandom_range(2 * amp, 0)) - amp;
    return 1.2 * x1 - 0.6 * x2 + real'(w);
  endfunction

  // Floating-point model of the adaptive lattice processor with the same
  // sample timing as the RTL: registered stage outputs, a start that clears
  // the coefficients one cycle later, 2 settling samples after a start or a
  // load, N accumulated samples, then a wait until the RTL reports its load
  // (the computation time is the RTL's). step() is called once per clock
  // edge with the values present before the edge.
  class lattice_ref;
    int  p, n;
    real k [], fo [], bo [], bd [];
    real c_s, f_s, b_s, k_next;
    int  phase;      // 0 idle, 1 settle, 2 accumulate, 3 wait for load
    int  cnt, stage;
    bit  clr_next;

    function new(int p_, int n_);
      p = p_; n = n_;
      k = new[p]; fo = new[p]; bo = new[p]; bd = new[p];
      for (int j = 0; j < p; j++) begin k[j] = 0.0; fo[j] = 0.0; bo[j] = 0.0; bd[j] = 0.0; end
      phase = 0; cnt = 0; stage = 0; clr_next = 0;
      c_s = 0.0; f_s = 0.0; b_s = 0.0; k_next = 0.0;
    endfunction

    // returns the coefficient the model loads at this edge (when loaded = 1)
    function void step(bit start, bit en, real x, bit rtl_load, output bit loaded, output real kval);
      real nfo [], nbo [], nbd [];
      real fi, bi;
      bit  clr_now;
      loaded = 0; kval = 0.0;
      clr_now = clr_next;
      clr_next = 0;
      if (start) begin
        phase = 1; cnt = 0; stage = 0; clr_next = 1;
      end else begin
        if (rtl_load && phase == 3) begin
          loaded = 1; kval = k_next;
          if (stage < p - 1) begin stage++; phase = 1; cnt = 0; end
          else phase = 0;
        end
        if (en) begin
          if (phase == 1) begin
            cnt++;
            if (cnt == 2) begin phase = 2; cnt = 0; c_s = 0.0; f_s = 0.0; b_s = 0.0; end
          end else if (phase == 2) begin
            fi = (stage == 0) ? x : fo[stage-1];
            c_s += fi * bd[stage];
            f_s += fi * fi;
            b_s += bd[stage] * bd[stage];
            cnt++;
            if (cnt == n) begin
              phase = 3;
              k_next = (f_s * b_s > 0.0) ? -c_s / $sqrt(f_s * b_s) : 0.0;
            end
          end
        end
      end
      if (en) begin
        nfo = new[p]; nbo = new[p]; nbd = new[p];
        for (int j = 0; j < p; j++) begin
          fi = (j == 0) ? x : fo[j-1];
          bi = (j == 0) ? x : bo[j-1];
          nfo[j] = fi + k[j] * bd[j];
          nbo[j] = bd[j] + k[j] * fi;
          nbd[j] = bi;
        end
        for (int j = 0; j < p; j++) begin fo[j] = nfo[j]; bo[j] = nbo[j]; bd[j] = nbd[j]; end
      end
      if (clr_now) for (int j = 0; j < p; j++) k[j] = 0.0;
      if (loaded) k[rtl_load_stage()] = kval;
    endfunction

    function int rtl_load_stage();
      // the stage just loaded: the current one, or the previous when the
      // model has already moved on
      return (phase == 0) ? p - 1 : stage - 1;
    endfunction

    function real out();
      return fo[p-1];
    endfunction
  endclass

  // Model of the lattice processor's input buffer: from the live stream
  // and the control inputs before a clock edge, what the filter is fed in
  // that cycle (fv, fx) and whether the coefficient unit starts (cst).
  class buffer_ref;
    int  n, mode, wcnt, ridx;      // mode: 0 stream, 1 capture, 2 playback
    real arr [];

    function new(int n_);
      n = n_; mode = 0; wcnt = 0; ridx = 0;
      arr = new[n];
    endfunction

    function void step(bit start, bit buffered, bit stop, bit x_valid, real x,
                       output bit fv, output real fx, output bit cst);
      fv  = (mode == 0) ? x_valid : (mode == 2);
      fx  = (mode == 2) ? arr[ridx] : x;
      cst = (start && !buffered) || (mode == 1 && x_valid && wcnt == n - 1);
      if (start && buffered) begin
        mode = 1; wcnt = 0;
      end else if (mode == 1) begin
        if (x_valid) begin
          arr[wcnt] = x;
          wcnt++;
          if (wcnt == n) begin mode = 2; ridx = 0; end
        end
      end else if (mode == 2) begin
        ridx = (ridx + 1) % n;
        if (stop) mode = 0;
      end
    endfunction
  endclass

endpackage
