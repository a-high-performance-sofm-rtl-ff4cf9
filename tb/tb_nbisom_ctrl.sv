// tb_nbisom_ctrl: self-checking test of the NBISOM controller, running it
// with the dual-port SRAM and a 1 x 2 chip array (a 5 x 10 map) and loading
// the SRAM through port A as the VME side would. A reference SOFM model in
// the testbench (Manhattan distance, tie rule, square neighbourhoods,
// shift-based adaptation) gives the expected results. Jobs run: WRITE of all
// weight vectors, READ back, RECALL (distances 0, 1, 36, a tie and random
// vectors; also with vector length 16), LEARN with three neighbourhood steps,
// READ back after learning, MASK of a best-match element and a RECALL that
// must avoid it, and a RECALL with every element masked (no match). The
// array cycles of each recall / learning job are counted on the control bus
// and compared with L + max(d, 1) (+ S + L when learning) per vector.
module tb_nbisom_ctrl;
  import sofm_pkg::*;
  localparam int MR = 5, MC = 10, AW = 13, L = 64;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  ctrl_op_e op = OP_NONE;
  logic busy, done;
  logic a_en = 0, a_we = 0;
  logic [AW-1:0] a_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata;
  logic b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [7:0] b_wdata, b_rdata;
  pe_cmd_e cmd;
  logic [7:0] arr_data, arr_rdata;
  logic arr_rdata_oe;
  logic [MR-1:0] row_drive, row_line;
  logic [MC-1:0] col_drive, col_line;

  int checks = 0, failures = 0;
  int nr, nc, nl;   // loop bounds, set at run time to keep the model loops rolled
  int arr_cycles = 0, exp_cycles;
  logic [7:0] wm [MR][MC][64];
  bit         msk [MR][MC];
  logic [7:0] vec [8][64];
  int n_tie = 0, n_mask = 0, n_nomatch = 0, n_learn = 0, n_recall = 0;

  dp_sram #(.AW(AW)) u_sram (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                             .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  nbisom_ctrl #(.MAP_ROWS(MR), .MAP_COLS(MC), .AW(AW)) dut (.*);
  nbisom_array #(.CHIP_ROWS(1), .CHIP_COLS(2)) u_arr (
    .clk, .rst_n, .cmd, .data_in(arr_data), .data_out(arr_rdata),
    .data_oe(arr_rdata_oe), .row_drive, .col_drive, .row_line, .col_line);

  always #5 clk = ~clk;
  always @(posedge clk)
    if (cmd inside {CMD_DIST, CMD_SEARCH, CMD_ALPHA, CMD_ADAPT}) arr_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pa_write(input int addr, input logic [7:0] d);
    a_en = 1; a_we = 1; a_addr = AW'(addr); a_wdata = d;
    @(posedge clk); #1; a_en = 0; a_we = 0;
  endtask

  task automatic pa_read(input int addr, output logic [7:0] d);
    a_en = 1; a_we = 0; a_addr = AW'(addr);
    @(posedge clk); #1; a_en = 0; d = a_rdata;
  endtask

  task automatic run(input ctrl_op_e o);
    int t = 0;
    op = o; start = 1; @(posedge clk); #1; start = 0;
    while (!done && t < 200000) begin @(posedge clk); #1; t++; end
    check(done, "job finished");
    @(posedge clk); #1;
    check(!busy, "idle after job");
  endtask

  task automatic set_params(input int nvec, input int vlen, input int nsteps, input int naddr);
    pa_write(DP_NVEC, 8'(nvec)); pa_write(DP_VLEN, 8'(vlen));
    pa_write(DP_NSTEPS, 8'(nsteps)); pa_write(DP_NADDR, 8'(naddr));
  endtask

  task automatic set_all_addresses();
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
      pa_write(DP_ADDRS + 2 * (r * MC + c), 8'(r));
      pa_write(DP_ADDRS + 2 * (r * MC + c) + 1, 8'(c));
    end
  endtask

  task automatic read_back(input string what);
    logic [7:0] d;
    set_params(0, L, 0, MR * MC);
    set_all_addresses();
    for (int i = 0; i < nr * MC * 64; i++) pa_write(DP_DATA + i, 8'h00);
    run(OP_READ);
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
      for (int j = 0; j < nl; j++) begin
        pa_read(DP_DATA + 64 * (r * MC + c) + j, d);
        check(d == wm[r][c][j], $sformatf("%s (%0d,%0d)[%0d] got %0d exp %0d",
                                          what, r, c, j, d, wm[r][c][j]));
      end
  endtask

  function automatic int mdist(input int v, input int r, input int c, input int len);
    int s = 0;
    for (int j = 0; j < len; j++)
      s += (vec[v][j] > wm[r][c][j]) ? vec[v][j] - wm[r][c][j] : wm[r][c][j] - vec[v][j];
    return s;
  endfunction

  // reference best match: smallest tied row and smallest tied column
  task automatic model_best(input int v, input int len, output int br, output int bc,
                            output int dmin, output bit tie);
    int d;
    dmin = 1 << 30; br = 255; bc = 255; tie = 0;
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
      if (!msk[r][c]) begin
        d = mdist(v, r, c, len);
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

  task automatic recall_check(input int n, input int len, input string what);
    int br, bc, dmin; bit tie;
    logic [7:0] gr, gc;
    set_params(n, len, 0, 0);
    load_vectors(n);
    arr_cycles = 0; exp_cycles = 0;
    run(OP_RECALL);
    for (int v = 0; v < n; v++) begin
      model_best(v, len, br, bc, dmin, tie);
      if (tie) n_tie++;
      if (br == 255) n_nomatch++;
      else exp_cycles += len + ((dmin > 0) ? dmin : 1);
      pa_read(DP_RESULT + 2 * v, gr); pa_read(DP_RESULT + 2 * v + 1, gc);
      check(gr == 8'(br) && gc == 8'(bc), $sformatf("%s vector %0d: got (%0d,%0d) exp (%0d,%0d) d=%0d",
                                                     what, v, gr, gc, br, bc, dmin));
    end
    if (n_nomatch == 0) check(arr_cycles == exp_cycles,
      $sformatf("%s: %0d array cycles, expected %0d", what, arr_cycles, exp_cycles));
    n_recall++;
  endtask

  initial begin
    #200000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int br, bc, dmin, dr, dc, sh, diff; bit tie;
    int steps_s [3] = '{3, 2, 1};
    int steps_r [3] = '{2, 1, 0};
    int shift_of [MR][MC];
    logic [7:0] gr, gc;
    nr = MR; nc = MC; nl = L;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---- WRITE all weight vectors, READ them back ----
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
      msk[r][c] = 0;
      for (int j = 0; j < nl; j++) wm[r][c][j] = 8'($urandom);
    end
    set_params(0, L, 0, MR * MC);
    set_all_addresses();
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
      for (int j = 0; j < nl; j++) pa_write(DP_DATA + 64 * (r * MC + c) + j, wm[r][c][j]);
    run(OP_WRITE);
    read_back("write/read");

    // ---- RECALL ----
    near(0, 2, 7, 36);
    near(1, 4, 0, 0);
    near(2, 0, 9, 1);
    near(3, 3, 3, 150);
    for (int j = 0; j < nl; j++) vec[4][j] = 8'($urandom);
    // tie: two elements of row 1 with the same weights, vector between
    for (int j = 0; j < nl; j++) wm[1][6][j] = wm[1][2][j];
    set_params(0, L, 0, 1);
    pa_write(DP_ADDRS, 8'd1); pa_write(DP_ADDRS + 1, 8'd6);
    for (int j = 0; j < nl; j++) pa_write(DP_DATA + j, wm[1][6][j]);
    run(OP_WRITE);
    near(5, 1, 6, 10);
    recall_check(6, L, "recall");
    recall_check(6, 16, "recall L=16");
    check(n_tie > 0, "tie case happened");

    // ---- LEARN: 3 vectors, 3 neighbourhood steps ----
    near(0, 2, 4, 36);
    near(1, 0, 0, 5);
    for (int j = 0; j < nl; j++) vec[2][j] = 8'($urandom);
    set_params(3, L, 3, 0);
    for (int s = 0; s < 3; s++) begin
      pa_write(DP_STEPS + 2 * s, 8'(steps_s[s]));
      pa_write(DP_STEPS + 2 * s + 1, 8'(steps_r[s]));
    end
    load_vectors(3);
    exp_cycles = 0;
    for (int v = 0; v < 3; v++) begin
      model_best(v, L, br, bc, dmin, tie);
      exp_cycles += L + ((dmin > 0) ? dmin : 1) + 3 + L;
      vec[7][v * 2] = 8'(br); vec[7][v * 2 + 1] = 8'(bc);
      for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) begin
        shift_of[r][c] = -1;
        dr = (r > br) ? r - br : br - r;
        dc = (c > bc) ? c - bc : bc - c;
        for (int s = 0; s < 3; s++)
          if (dr <= steps_r[s] && dc <= steps_r[s]) shift_of[r][c] = steps_s[s];
      end
      for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++)
        if (shift_of[r][c] >= 0) begin
          for (int j = 0; j < nl; j++) begin
            diff = int'(vec[v][j]) - int'(wm[r][c][j]);
            wm[r][c][j] = 8'(int'(wm[r][c][j]) + (diff >>> shift_of[r][c]));
          end
        end
    end
    arr_cycles = 0;
    run(OP_LEARN);
    n_learn++;
    check(arr_cycles == exp_cycles,
          $sformatf("learn: %0d array cycles, expected %0d", arr_cycles, exp_cycles));
    for (int v = 0; v < 3; v++) begin
      pa_read(DP_RESULT + 2 * v, gr); pa_read(DP_RESULT + 2 * v + 1, gc);
      check(gr == vec[7][v * 2] && gc == vec[7][v * 2 + 1],
            $sformatf("learn vector %0d position (%0d,%0d)", v, gr, gc));
    end
    read_back("after learning");

    // ---- MASK the winner of a vector, recall must avoid it ----
    near(0, 3, 8, 3);
    set_params(0, L, 0, 1);
    pa_write(DP_ADDRS, 8'd3); pa_write(DP_ADDRS + 1, 8'd8);
    run(OP_MASK);
    msk[3][8] = 1; n_mask++;
    recall_check(1, L, "recall with mask");
    // ---- every element masked: no match ----
    set_params(0, L, 0, MR * MC);
    set_all_addresses();
    run(OP_MASK);
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) msk[r][c] = 1;
    recall_check(1, L, "recall, all masked");
    check(n_nomatch == 1, "no-match case happened");
    $display("jobs: recall=%0d learn=%0d ties=%0d masks=%0d no-match=%0d",
             n_recall, n_learn, n_tie, n_mask, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
