// mod_check: stimulus and checking for the inverse DTCWT modulator,
// shared by its unit test and the modem test. The includer declares clk,
// rst_n, checks, failures, NLVL and the modulator signals sym_vld, sym_rdy,
// sym, out_vld, out_rdy, xr and xi.
//
// A frame is MNF symbols on streams 0 and 1 of each tree and MNF * 2^(k-1)
// on stream k, all random 8-bit values. The expected output is computed in
// direct form: insert a zero after every sample, convolve with the ten-tap
// synthesis filters, add the two branches, divide by 64 and saturate; then
// add and subtract the two tree outputs. mod_run_phase(1) offers data on
// every stream and keeps the output ready; mod_run_phase(0) withholds
// symbols and output-ready at random.

  localparam int MNF   = 6;
  localparam int MNOUT = MNF << NLVL;

  localparam int MG2 [4][10] = '{
    '{ 2, 0, -6, 15,  44,  44,  0, -6, 0,  0},
    '{ 0, 0, -6,  0,  44, -44, 15,  6, 0, -2},
    '{ 0, 0, -6,  0,  44,  44, 15, -6, 0,  2},
    '{-2, 0,  6, 15, -44,  44,  0, -6, 0,  0}
  };
  localparam int MG1 [4][10] = '{
    '{ 0,  1,  1, -6,   6, 45, 45,  6, -6, 0},
    '{ 0, -6, -6, 45, -45,  6,  6,  1, -1, 0},
    '{ 0,  0, -6,  6,  45, 45,  6, -6,  1, 1},
    '{-1,  1,  6,  6, -45, 45, -6, -6,  0, 0}
  };

  int m_seq [2][NLVL+1][$];
  int m_idx [2][NLVL+1];
  int m_exp_r [$], m_exp_i [$];
  int m_oi;
  bit m_full_rate;
  int n_out_stall, n_sym_gap, m_first, m_last;
  longint m_cyc = 0;

  always @(posedge clk) m_cyc <= m_cyc + 1;

  function automatic int m_sat16(longint v);
    longint s = v >>> 6;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  // One synthesis level in direct form.
  function automatic void m_synth(input int a[$], input int d[$], input int t,
                                input bit last, output int y[$]);
    int n = 2 * a.size();
    y = {};
    for (int m = 0; m < n; m++) begin
      longint acc = 0;
      for (int j = 0; j < 10; j++) begin
        int q = m - j;
        if (q >= 0 && q % 2 == 0) begin
          int g0 = last ? MG1[2*t][j]   : MG2[2*t][j];
          int g1 = last ? MG1[2*t+1][j] : MG2[2*t+1][j];
          acc += longint'(g0) * a[q/2] + longint'(g1) * d[q/2];
        end
      end
      y.push_back(m_sat16(acc));
    end
  endfunction

  task automatic m_make_frame();
    int y [2][$];
    for (int t = 0; t < 2; t++) begin
      int a [$];
      for (int k = 0; k <= NLVL; k++) begin
        int len = (k == 0) ? MNF : MNF << (k - 1);
        m_seq[t][k] = {};
        for (int i = 0; i < len; i++)
          m_seq[t][k].push_back($signed(8'($urandom)));
        m_idx[t][k] = 0;
      end
      a = m_seq[t][0];
      for (int k = 0; k < NLVL; k++) begin
        int yy [$];
        m_synth(a, m_seq[t][k+1], t, k == NLVL - 1, yy);
        a = yy;
      end
      y[t] = a;
    end
    m_exp_r = {};
    m_exp_i = {};
    for (int m = 0; m < MNOUT; m++) begin
      m_exp_r.push_back(y[0][m] + y[1][m]);
      m_exp_i.push_back(y[0][m] - y[1][m]);
    end
    m_oi = 0;
  endtask

  // Drivers change on the falling edge, transfers count on the rising edge.
  always @(negedge clk) begin
    for (int t = 0; t < 2; t++)
      for (int k = 0; k <= NLVL; k++) begin
        bit offer;
        offer = m_idx[t][k] < m_seq[t][k].size() &&
                (m_full_rate || ($urandom % 4) != 0);
        sym_vld[t][k] <= offer;
        sym[t][k]     <= offer ? IN_W'(m_seq[t][k][m_idx[t][k]]) : '0;
      end
    out_rdy <= m_full_rate || ($urandom % 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 2; t++)
      for (int k = 0; k <= NLVL; k++) begin
        if (sym_vld[t][k] && sym_rdy[t][k]) m_idx[t][k]++;
        if (!sym_vld[t][k] && m_idx[t][k] < m_seq[t][k].size()) n_sym_gap++;
      end
    if (out_vld && !out_rdy) n_out_stall++;
    if (out_vld && out_rdy) begin
      checks++;
      if (m_oi >= MNOUT) begin
        failures++;
        $display("FAIL extra output at cycle %0d", m_cyc);
      end else if (int'(xr) != m_exp_r[m_oi] || int'(xi) != m_exp_i[m_oi]) begin
        failures++;
        if (failures < 10)
          $display("FAIL output %0d: got %0d/%0d expected %0d/%0d",
                   m_oi, xr, xi, m_exp_r[m_oi], m_exp_i[m_oi]);
      end
      if (m_oi == 0) m_first = int'(m_cyc);
      m_last = int'(m_cyc);
      m_oi++;
    end
  end

  task automatic mod_run_phase(bit fr);
    rst_n = 1'b0;
    m_full_rate = fr;
    m_make_frame();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (m_oi < MNOUT) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (m_oi != MNOUT) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", m_oi, MNOUT);
    end
  endtask

  // Both phases with their checks.
  task automatic mod_test();
    n_out_stall = 0;
    n_sym_gap = 0;
    sym_vld = '0;
    out_rdy = 1'b0;
    for (int t = 0; t < 2; t++)
      for (int k = 0; k <= NLVL; k++) sym[t][k] = '0;

    mod_run_phase(1'b1);
    // At full rate the last stage sends one sample every cycle.
    checks++;
    if (m_last - m_first != MNOUT - 1) begin
      failures++;
      $display("FAIL full rate: %0d outputs over %0d cycles", MNOUT,
               m_last - m_first + 1);
    end

    n_out_stall = 0;
    n_sym_gap = 0;
    mod_run_phase(1'b0);
    checks++;
    if (n_out_stall == 0) begin
      failures++;
      $display("FAIL output back-pressure never happened");
    end
    checks++;
    if (n_sym_gap == 0) begin
      failures++;
      $display("FAIL symbol gaps never happened");
    end
    $display("modulator: output stalls %0d, symbol gaps %0d", n_out_stall, n_sym_gap);
  endtask
