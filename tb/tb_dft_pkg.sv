// tb_dft_pkg: testbench helpers. Reference arithmetic in double precision
// (real), conversions between real and single precision bit patterns that do
// not share code with the design, and a host model that lays out the input
// vectors in the accelerator SRAM the way the host software serializes them
// and computes the expected orbitals and densities.
package tb_dft_pkg;

  // fp32 bits to real (subnormals read as zero, like the design).
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real to fp32, round to nearest even, found by comparing the two
  // neighbouring single precision values around r.
  function automatic logic [31:0] r2f(input real r);
    real         a, lo, hi, ulp;
    int          e;
    logic [22:0] m;
    logic        s;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a < 1.1754943508222875e-38) return {s, 31'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    if (e > 127) return {s, 8'hFF, 23'd0};
    ulp = 1.0 / 8388608.0;
    m   = 23'($rtoi((a - 1.0) / ulp));
    lo  = 1.0 + real'(m) * ulp;
    hi  = lo + ulp;
    if ((a - lo) > (hi - a) || ((a - lo) == (hi - a) && m[0])) begin
      if (m == 23'h7FFFFF) begin m = 0; e++; end
      else m = m + 1;
    end
    if (e > 127) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), m};
  endfunction

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // |got - exp| <= rel*|exp| + abstol
  function automatic bit close(input real got, input real expv, input real rel,
                               input real abstol);
    return absr(got - expv) <= rel * absr(expv) + abstol;
  endfunction

  function automatic real urand_real(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  // signed fixed-point (96 bits, 56 fractional) to real
  function automatic real fix2r(input logic [95:0] v, input int frac);
    logic [95:0] m;
    real         r;
    bit          neg;
    neg = v[95];
    m   = neg ? (~v + 1'b1) : v;
    r   = 0.0;
    for (int i = 95; i >= 0; i--) r = r * 2.0 + (m[i] ? 1.0 : 0.0);
    r = r / pow2(frac);
    return neg ? -r : r;
  endfunction

  // Number of Cartesian orbitals and their exponents, x before y before z.
  function automatic int nshell(input int tp);
    case (tp) 1: return 1; 2: return 3; 3: return 6; 4: return 10; default: return 0; endcase
  endfunction

  function automatic void cart(input int tp, input int k, output int ex, output int ey,
                               output int ez);
    int l, n;
    l = tp - 1;
    n = 0;
    ex = 0; ey = 0; ez = 0;
    for (int a = l; a >= 0; a--)
      for (int b = l - a; b >= 0; b--) begin
        if (n == k) begin ex = a; ey = b; ez = l - a - b; end
        n++;
      end
  endfunction

  // ------------------------------------------------------------------
  // Host model: basis, grid block, Delta; SRAM image and references.
  class dft_host;
    int    n_atoms, n_points, n_orb, lanes;
    int    shell_tp[$], shell_kw[$], shell_atom[$];
    real   coef_c[$], coef_a[$];
    real   ax[$], ay[$], az[$];           // atom centres
    real   px[$], py[$], pz[$];           // grid points
    real   delta[][];                      // n_orb x n_orb, symmetric
    real   chi[][];                        // n_points x n_orb
    real   rho[];
    // SRAM image
    logic [127:0] img[$];
    int    base_ac, n_ac, base_kw, n_kw, base_xy, n_xy, base_z, n_z, base_r2, n_r2,
           base_d, n_d;

    function new(int lanes_i);
      lanes = lanes_i;
      n_atoms = 0;
    endfunction

    // add an atom: shells given as parallel lists
    function void add_atom(real x, real y, real z, int tps[$], int kws[$]);
      ax.push_back(x); ay.push_back(y); az.push_back(z);
      foreach (tps[s]) begin
        shell_tp.push_back(tps[s]);
        shell_kw.push_back(kws[s]);
        shell_atom.push_back(n_atoms);
        for (int i = 0; i < kws[s]; i++) begin
          coef_a.push_back(urand_real(0.1, 8.0) * pow2(i % 3));
          coef_c.push_back(urand_real(-1.0, 1.5));
        end
      end
      n_atoms++;
    endfunction

    // 6-31G-like water: O 1s(6) 2s(3) 2p(3) 3s(1) 3p(1); H 1s(3) 2s(1)
    function void water();
      add_atom(0.0, 0.0, 0.117, '{1, 1, 2, 1, 2}, '{6, 3, 3, 1, 1});
      add_atom(0.0, 0.757, -0.469, '{1, 1}, '{3, 1});
      add_atom(0.0, -0.757, -0.469, '{1, 1}, '{3, 1});
    endfunction

    function void make_points(int n, real spread);
      n_points = n;
      for (int p = 0; p < n; p++) begin
        px.push_back(urand_real(-spread, spread));
        py.push_back(urand_real(-spread, spread));
        pz.push_back(urand_real(-spread, spread));
      end
    endfunction

    // Build references and the SRAM image.
    function void build();
      int  o, ci;
      real rx, ry, rz, r2, ep, mono;
      int  ex, ey, ez;
      logic [63:0] q[$];
      logic [15:0] ctl[$];
      n_orb = 0;
      foreach (shell_tp[s]) n_orb += nshell(shell_tp[s]);
      delta = new[n_orb];
      foreach (delta[i]) delta[i] = new[n_orb];
      for (int i = 0; i < n_orb; i++)
        for (int j = i; j < n_orb; j++) begin
          delta[i][j] = urand_real(-1.0, 1.0) / (1.0 + absr(real'(i - j)));
          delta[j][i] = delta[i][j];
        end
      // orbitals, computed in double precision
      chi = new[n_points];
      rho = new[n_points];
      for (int p = 0; p < n_points; p++) begin
        chi[p] = new[n_orb];
        o  = 0;
        ci = 0;
        foreach (shell_tp[s]) begin
          int at;
          at = shell_atom[s];
          rx = px[p] - ax[at]; ry = py[p] - ay[at]; rz = pz[p] - az[at];
          r2 = rx * rx + ry * ry + rz * rz;
          ep = 0.0;
          for (int i = 0; i < shell_kw[s]; i++) begin
            ep += coef_c[ci] * $exp(-coef_a[ci] * r2);
            ci++;
          end
          for (int k = 0; k < nshell(shell_tp[s]); k++) begin
            cart(shell_tp[s], k, ex, ey, ez);
            mono = (rx ** ex) * (ry ** ey) * (rz ** ez);
            chi[p][o] = mono * ep;
            o++;
          end
        end
        rho[p] = 0.0;
        for (int i = 0; i < n_orb; i++)
          for (int j = 0; j < n_orb; j++)
            rho[p] += chi[p][i] * chi[p][j] * delta[i][j];
      end
      // ---- SRAM image
      img.delete();
      // T_alpha_C: {alpha, C}
      base_ac = 0;
      foreach (coef_c[i]) img.push_back({$realtobits(coef_a[i]), $realtobits(coef_c[i])});
      n_ac = img.size() - base_ac;
      // T_kw_tp_a: (kw, tp) pairs, (0,0) after each atom, four per word
      for (int a = 0; a < n_atoms; a++) begin
        foreach (shell_tp[s])
          if (shell_atom[s] == a) ctl.push_back({8'(shell_tp[s]), 8'(shell_kw[s])});
        ctl.push_back(16'd0);
      end
      while (ctl.size() % 4 != 0) ctl.push_back(16'd0);
      base_kw = img.size();
      for (int i = 0; i < ctl.size(); i += 4)
        img.push_back({64'd0, ctl[i+3], ctl[i+2], ctl[i+1], ctl[i]});
      n_kw = img.size() - base_kw;
      // coordinates: point by point, atom by atom
      base_xy = img.size();
      for (int p = 0; p < n_points; p++)
        for (int a = 0; a < n_atoms; a++)
          img.push_back({$realtobits(py[p] - ay[a]), $realtobits(px[p] - ax[a])});
      n_xy = img.size() - base_xy;
      q.delete();
      for (int p = 0; p < n_points; p++)
        for (int a = 0; a < n_atoms; a++) q.push_back($realtobits(pz[p] - az[a]));
      base_z = img.size();
      for (int i = 0; i < q.size(); i += 2)
        img.push_back({(i + 1 < q.size()) ? q[i+1] : 64'd0, q[i]});
      n_z = img.size() - base_z;
      q.delete();
      for (int p = 0; p < n_points; p++)
        for (int a = 0; a < n_atoms; a++) begin
          rx = px[p] - ax[a]; ry = py[p] - ay[a]; rz = pz[p] - az[a];
          q.push_back($realtobits(rx * rx + ry * ry + rz * rz));
        end
      base_r2 = img.size();
      for (int i = 0; i < q.size(); i += 2)
        img.push_back({(i + 1 < q.size()) ? q[i+1] : 64'd0, q[i]});
      n_r2 = img.size() - base_r2;
      // Delta: upper triangle, row order, two per word
      q.delete();
      for (int i = 0; i < n_orb; i++)
        for (int j = i; j < n_orb; j++) q.push_back($realtobits(delta[i][j]));
      base_d = img.size();
      for (int i = 0; i < q.size(); i += 2)
        img.push_back({(i + 1 < q.size()) ? q[i+1] : 64'd0, q[i]});
      n_d = img.size() - base_d;
    endfunction

    function int passes();
      return (n_points + lanes - 1) / lanes;
    endfunction
  endclass

endpackage
