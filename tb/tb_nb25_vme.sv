// tb_nb25_vme: end-to-end test of the NB25-VME board at its full default
// size (4 x 4 chips, a 20 x 20 map, 64 weights per element), driven only
// through the VME bus as a host would: it fills the SRAM window, starts jobs
// through the control register, waits for the interrupt, reads the results
// and clears the interrupt. A reference SOFM model in the testbench gives the
// expected best-match positions and weights.
//
// Sequence: WRITE all 400 weight vectors (five jobs of 80 elements), READ one
// batch back; RECALL of a vector at distance 36 (must take the paper's 100
// array cycles); LEARN of the same kind of vector with 8 neighbourhood steps
// (alpha 1/128 on a 15 x 15 square down to alpha 1 on the winner, the
// paper's 172 cycles); RECALL of several vectors including a tie; LEARN of
// three vectors; READ of all 400 weight vectors against the model; MASK of a
// winner and a RECALL that must avoid it; MASK of all elements and a RECALL
// that reports no match. Each mechanism is counted and must occur.
module tb_nb25_vme;
  import sofm_pkg::*;
  localparam int MR = 20, MC = 20, L = 64, BATCH = 80;

  logic clk = 0, rst_n = 0;
  logic [23:0] vme_addr = 0;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [7:0] vme_din = 0, vme_dout;
  logic vme_dout_oe, vme_dtack_n, vme_irq_n;

  int checks = 0, failures = 0;
  int nr, nc, nl;   // loop bounds, set at run time to keep the model loops rolled
  int arr_cycles = 0, exp_cycles;
  logic [7:0] wm [MR][MC][64];
  bit         msk [MR][MC];
  logic [7:0] vec [8][64];
  int n_write = 0, n_read = 0, n_recall = 0, n_learn = 0, n_mask = 0;
  int n_tie = 0, n_nomatch = 0, n_irq = 0;

  nb25_vme dut (.*);

  always #5 clk = ~clk;   // 100 MHz in simulation; cycles are what count
  always @(posedge clk)
    if (dut.cmd inside {CMD_DIST, CMD_SEARCH, CMD_ALPHA, CMD_ADAPT}) arr_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(input int addr, input bit wr, input logic [7:0] d, output logic [7:0] q);
    int t = 0;
    vme_addr = 24'h400000 | 24'(addr); vme_write_n = !wr; vme_din = d;
    #2 vme_as_n = 0; vme_ds_n = 0;
    while (vme_dtack_n && t < 50) begin @(posedge clk); #1; t++; end
    if (vme_dtack_n) begin failures++; $display("FAIL no DTACK at %h", addr); end
    q = vme_dout;
    vme_as_n = 1; vme_ds_n = 1;
    while (!vme_dtack_n) begin @(posedge clk); #1; end
    repeat (3) @(posedge clk); #1;
  endtask

  task automatic pa_write(input int addr, input logic [7:0] d);
    logic [7:0] q;
    bus(addr, 1, d, q);
  endtask

  task automatic pa_read(input int addr, output logic [7:0] d);
    bus(addr, 0, 0, d);
  endtask

  task automatic run(input ctrl_op_e o);
    int t = 0;
    logic [7:0] st;
    pa_write('h8000, 8'h80 | 8'(o));
    while (vme_irq_n && t < 400000) begin @(posedge clk); #1; t++; end
    check(!vme_irq_n, "interrupt at the end of the job");
    if (!vme_irq_n) n_irq++;
    pa_read('h8000, st);
    check(!st[7] && st[6] && st[2:0] == 3'(o), $sformatf("status %h", st));
    pa_write('h8001, 8'h00);
    check(vme_irq_n, "interrupt cleared");
  endtask

  task automatic set_params(input int nvec, input int vlen, input int nsteps, input int naddr);
    pa_write(DP_NVEC, 8'(nvec)); pa_write(DP_VLEN, 8'(vlen));
    pa_write(DP_NSTEPS, 8'(nsteps)); pa_write(DP_NADDR, 8'(naddr));
  endtask

  // elements first .. first+n-1 in row-major order
  task automatic set_addresses(input int first, input int n);
    for (int i = 0; i < n; i++) begin
      pa_write(DP_ADDRS + 2 * i, 8'((first + i) / MC));
      pa_write(DP_ADDRS + 2 * i + 1, 8'((first + i) % MC));
    end
  endtask

  task automatic write_all();
    for (int b = 0; b < nr * MC; b += BATCH) begin
      set_params(0, L, 0, BATCH);
      set_addresses(b, BATCH);
      for (int i = 0; i < BATCH; i++)
        for (int j = 0; j < nl; j++)
          pa_write(DP_DATA + 64 * i + j, wm[(b + i) / MC][(b + i) % MC][j]);
      run(OP_WRITE);
      n_write++;
    end
  endtask

  task automatic read_back(input int first, input int n, input string what);
    logic [7:0] d;
    for (int b = first; b < first + n; b += BATCH) begin
      set_params(0, L, 0, BATCH);
      set_addresses(b, BATCH);
      run(OP_READ);
      n_read++;
      for (int i = 0; i < BATCH; i++)
        for (int j = 0; j < nl; j++) begin
          pa_read(DP_DATA + 64 * i + j, d);
          check(d == wm[(b + i) / MC][(b + i) % MC][j],
                $sformatf("%s element %0d [%0d] got %0d", what, b + i, j, d));
        end
    end
  endtask

  function automatic int mdist(input int v, input int r, input int c);
    int s = 0;
    for (int j = 0; j < nl; j++)
      s += (vec[v][j] > wm[r][c][j]) ? vec[v][j] - wm[r][c][j] : wm[r][c][j] - vec[v][j];
    return s;
  endfunction

  task automatic model_best(input int v, output int br, output int bc,
                            output int dmin, output bit tie);
    int d;
    dmin = 1 << 30; br = 255; bc = 255; tie = 0;
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
      if (!msk[r][c]) begin
        d = mdist(v, r, c);
        if (d < dmin) begin dmin = d; br = r; bc = c; tie = 0; end
        else if (d == dmin) begin
          tie = 1;
          if (r < br) br = r;
          if (c < bc) bc = c;
        end
      end
  endtask

  task automatic near(input int v, input int r, input int c, input int dd);
    for (int j = 0; j < nl; j++) vec[v][j] = wm[r][c][j];
    for (int j = 0; j < dd; j++) vec[v][j % 64] = (wm[r][c][j % 64] < 128) ?
      vec[v][j % 64] + 1 : vec[v][j % 64] - 1;
  endtask

  task automatic load_vectors(input int n);
    for (int v = 0; v < n; v++)
      for (int j = 0; j < nl; j++) pa_write(DP_DATA + 64 * v + j, vec[v][j]);
  endtask

  task automatic recall_check(input int n, input string what);
    int br, bc, dmin; bit tie, nm;
    logic [7:0] gr, gc;
    set_params(n, L, 0, 0);
    load_vectors(n);
    arr_cycles = 0; exp_cycles = 0; nm = 0;
    run(OP_RECALL);
    n_recall++;
    for (int v = 0; v < n; v++) begin
      model_best(v, br, bc, dmin, tie);
      if (tie) n_tie++;
      if (br == 255) begin n_nomatch++; nm = 1; end
      else exp_cycles += L + ((dmin > 0) ? dmin : 1);
      pa_read(DP_RESULT + 2 * v, gr); pa_read(DP_RESULT + 2 * v + 1, gc);
      check(gr == 8'(br) && gc == 8'(bc), $sformatf("%s vector %0d: got (%0d,%0d) exp (%0d,%0d)",
                                                     what, v, gr, gc, br, bc));
    end
    if (!nm) check(arr_cycles == exp_cycles,
      $sformatf("%s: %0d array cycles, expected %0d", what, arr_cycles, exp_cycles));
  endtask

  // learning job with the model update; returns the array cycles it took
  task automatic learn_check(input int n, input int nsteps, input int ss[8], input int rr[8]);
    int br, bc, dmin, dr, dc, diff; bit tie;
    int shift_of [MR][MC];
    int pos [8][2];
    logic [7:0] gr, gc;
    set_params(n, L, nsteps, 0);
    for (int s = 0; s < nsteps; s++) begin
      pa_write(DP_STEPS + 2 * s, 8'(ss[s]));
      pa_write(DP_STEPS + 2 * s + 1, 8'(rr[s]));
    end
    load_vectors(n);
    exp_cycles = 0;
    for (int v = 0; v < n; v++) begin
      model_best(v, br, bc, dmin, tie);
      exp_cycles += L + ((dmin > 0) ? dmin : 1) + nsteps + L;
      pos[v][0] = br; pos[v][1] = bc;
      for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
        shift_of[r][c] = -1;
        dr = (r > br) ? r - br : br - r;
        dc = (c > bc) ? c - bc : bc - c;
        for (int s = 0; s < nsteps; s++)
          if (dr <= rr[s] && dc <= rr[s]) shift_of[r][c] = ss[s];
      end
      for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
        if (shift_of[r][c] >= 0 && !msk[r][c])
          for (int j = 0; j < nl; j++) begin
            diff = int'(vec[v][j]) - int'(wm[r][c][j]);
            wm[r][c][j] = 8'(int'(wm[r][c][j]) + (diff >>> shift_of[r][c]));
          end
    end
    arr_cycles = 0;
    run(OP_LEARN);
    n_learn++;
    check(arr_cycles == exp_cycles,
          $sformatf("learn: %0d array cycles, expected %0d", arr_cycles, exp_cycles));
    for (int v = 0; v < n; v++) begin
      pa_read(DP_RESULT + 2 * v, gr); pa_read(DP_RESULT + 2 * v + 1, gc);
      check(gr == 8'(pos[v][0]) && gc == 8'(pos[v][1]),
            $sformatf("learn vector %0d position (%0d,%0d)", v, gr, gc));
    end
  endtask

  initial begin
    #400000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ss8 [8] = '{7, 6, 5, 4, 3, 2, 1, 0};
    int rr8 [8] = '{7, 6, 5, 4, 3, 2, 1, 0};
    int ss3 [8] = '{3, 2, 1, 0, 0, 0, 0, 0};
    int rr3 [8] = '{2, 1, 0, 0, 0, 0, 0, 0};
    nr = MR; nc = MC; nl = L;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;

    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
      msk[r][c] = 0;
      for (int j = 0; j < nl; j++) wm[r][c][j] = 8'($urandom);
    end
    write_all();
    read_back(160, BATCH, "write/read");

    // the paper's timing case: minimum distance 36
    near(0, 13, 6, 36);
    recall_check(1, "recall d=36");
    check(arr_cycles == 100, $sformatf("recall took %0d array cycles, paper: 100", arr_cycles));
    $display("recall: %0d cycles -> %0d MCPS at 16 MHz for %0d elements x 64", arr_cycles,
             MR * MC * 64 * 16 / arr_cycles, MR * MC);
    near(0, 9, 17, 36);
    learn_check(1, 8, ss8, rr8);
    check(arr_cycles == 172, $sformatf("learning took %0d array cycles, paper: 172", arr_cycles));
    $display("learning: %0d cycles -> %0d MCUPS at 16 MHz for %0d elements x 64", arr_cycles,
             MR * MC * 64 * 16 / arr_cycles, MR * MC);

    // several vectors, with a tie between (4,3) and (4,15)
    for (int j = 0; j < nl; j++) wm[4][15][j] = wm[4][3][j];
    set_params(0, L, 0, 1);
    pa_write(DP_ADDRS, 8'd4); pa_write(DP_ADDRS + 1, 8'd15);
    for (int j = 0; j < nl; j++) pa_write(DP_DATA + j, wm[4][15][j]);
    run(OP_WRITE); n_write++;
    near(0, 0, 0, 0);
    near(1, 19, 19, 1);
    near(2, 4, 15, 12);
    near(3, 10, 2, 300);
    for (int j = 0; j < nl; j++) vec[4][j] = 8'($urandom);
    recall_check(5, "recall");

    near(0, 2, 2, 20);
    near(1, 17, 11, 3);
    for (int j = 0; j < nl; j++) vec[2][j] = 8'($urandom);
    learn_check(3, 3, ss3, rr3);
    read_back(0, MR * MC, "after learning");

    // fade out a faulty element
    near(0, 6, 12, 2);
    set_params(0, L, 0, 1);
    pa_write(DP_ADDRS, 8'd6); pa_write(DP_ADDRS + 1, 8'd12);
    run(OP_MASK); n_mask++;
    msk[6][12] = 1;
    recall_check(1, "recall with a masked element");
    for (int b = 0; b < nr * MC; b += BATCH) begin
      set_params(0, L, 0, BATCH);
      set_addresses(b, BATCH);
      run(OP_MASK); n_mask++;
    end
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) msk[r][c] = 1;
    recall_check(1, "recall, all masked");

    $display("mechanisms: write=%0d read=%0d recall=%0d learn=%0d mask=%0d tie=%0d no-match=%0d irq=%0d",
             n_write, n_read, n_recall, n_learn, n_mask, n_tie, n_nomatch, n_irq);
    check(n_write > 0 && n_read > 0 && n_recall > 0 && n_learn > 0 && n_mask > 0, "all job types ran");
    check(n_tie > 0, "tie in the search happened");
    check(n_nomatch > 0, "no-match happened");
    check(n_irq > 0, "interrupts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
