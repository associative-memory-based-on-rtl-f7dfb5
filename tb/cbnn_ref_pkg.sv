// cbnn_ref_pkg: behavioural reference of the Sparse-CbNN associative memory,
// used by the testbenches to compute expected results independently of the
// RTL. It keeps the full (c*l) x (c*l) adjacency matrix and applies the
// rules directly from their definitions: Hamming / Euclidean initialisation,
// Boolean equation, Sum-of-Max, Integer-Sum-of-Max and k-G-WtA (threshold =
// k-th highest score, zero scores never win). It also records a_max, the
// largest number of active neurons in one cluster, for every iteration, so
// that the testbenches can predict the decoding latency. It further provides
// the oriented-edge pattern generator and the noise models.
package cbnn_ref_pkg;

  class cbnn_model #(int C = 25, int L = 8);
    bit w [C*L][C*L];
    int amax [];
    int nwin [];

    function void clear();
      foreach (w[a, b]) w[a][b] = 0;
    endfunction

    function void store(int pat [C]);
      for (int j = 0; j < C; j++)
        for (int jp = 0; jp < C; jp++)
          if (j != jp && pat[j] > 0 && pat[jp] > 0) w[j*L + pat[j] - 1][jp*L + pat[jp] - 1] = 1;
    endfunction

    static function int potential(int vin, int i);
      int v;
      v = (vin > L) ? L : vin;
      if (v == 0) return 0;
      return L*L - (v - (i + 1)) * (v - (i + 1));
    endfunction

    // arch: 1..4 for V1..V4
    function void decode(int patch [C], int arch, int s, int iter, int k0, int kstep,
                         output bit st [C*L]);
      int p [C*L];
      int sc [C*L];
      bit nx [C*L];
      int k;
      amax = new[iter];
      nwin = new[iter];
      // initialisation
      for (int j = 0; j < C; j++) begin
        int v;
        v = (patch[j] > L) ? L : patch[j];
        for (int i = 0; i < L; i++) begin
          p[j*L+i]  = potential(patch[j], i);
          st[j*L+i] = 0;
        end
        if (v != 0) begin
          if (arch != 4) st[j*L + v - 1] = 1;
          else begin
            // pick the s nearest values one by one, lower index on ties
            for (int n = 0; n < s && n < L; n++) begin
              int best;
              best = -1;
              for (int i = 0; i < L; i++)
                if (!st[j*L+i] && (best < 0 || p[j*L+i] > p[j*L+best])) best = i;
              st[j*L+best] = 1;
            end
          end
        end
      end
      k = k0;
      for (int it = 0; it < iter; it++) begin
        amax[it] = 0;
        for (int j = 0; j < C; j++) begin
          int a;
          a = 0;
          for (int i = 0; i < L; i++) a += st[j*L+i];
          if (a > amax[it]) amax[it] = a;
        end
        if (arch == 1) begin
          for (int j = 0; j < C; j++)
            for (int i = 0; i < L; i++) begin
              bit own_any, ok;
              own_any = 0;
              for (int q = 0; q < L; q++) own_any |= st[j*L+q];
              ok = st[j*L+i] || !own_any;
              for (int jp = 0; jp < C; jp++) begin
                bit any, hit;
                if (jp == j) continue;
                any = 0; hit = 0;
                for (int q = 0; q < L; q++) begin
                  any |= st[jp*L+q];
                  hit |= st[jp*L+q] & w[j*L+i][jp*L+q];
                end
                if (any && !hit) ok = 0;
              end
              nx[j*L+i] = ok;
            end
        end else begin
          int sorted [$];
          int thr;
          for (int j = 0; j < C; j++)
            for (int i = 0; i < L; i++) begin
              int tot;
              tot = (arch == 4) ? (st[j*L+i] ? p[j*L+i] : 0) : int'(st[j*L+i]);
              for (int jp = 0; jp < C; jp++) begin
                int m;
                if (jp == j) continue;
                m = 0;
                for (int q = 0; q < L; q++)
                  if (st[jp*L+q] && w[j*L+i][jp*L+q]) begin
                    int val;
                    val = (arch == 4) ? p[jp*L+q] : 1;
                    if (val > m) m = val;
                  end
                tot += m;
              end
              sc[j*L+i] = tot;
            end
          sorted = {};
          foreach (sc[n]) sorted.push_back(sc[n]);
          sorted.rsort();
          thr = (k <= C*L) ? sorted[k-1] : 0;
          foreach (sc[n]) nx[n] = (sc[n] >= thr) && (sc[n] > 0);
          k = (k > kstep) ? k - kstep : 1;
        end
        nwin[it] = 0;
        foreach (nx[n]) nwin[it] += nx[n];
        st = nx;
      end
    endfunction
  endclass

  // Oriented edge of orientation o (of norient, over 180 degrees) and
  // intensity v in an n x n patch: pixels whose centre lies within half a
  // pixel of the line through the patch centre.
  function automatic void edge_pattern(int n, int norient, int o, int v, ref int pat []);
    real th, cx, dx, dy, d;
    pat = new[n*n];
    th = 3.14159265358979 * o / norient;
    cx = (n - 1) / 2.0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        dx = x - cx;
        dy = y - cx;
        d = -dx * $sin(th) + dy * $cos(th);
        if (d < 0) d = -d;
        pat[y*n + x] = (d < 0.5) ? v : 0;
      end
  endfunction

  function automatic real gauss(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

endpackage
