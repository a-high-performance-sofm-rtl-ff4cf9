// nbisom_ctrl: the NBISOM controller, which runs the chip array.
//
// A job is started by the VME side (start + op) and works on the dual-port
// SRAM through port B. The controller first reads the parameter field (number
// of vectors, vector length L, number of neighbourhood steps with an alpha
// shift and a radius each, number of addressed elements), then:
//
//   OP_RECALL  per vector: CLR, L x DIST (one component per cycle), SEARCH
//              until a row and a column line are asserted; the first active
//              row and column are the best-match position, written to the
//              result field.
//   OP_LEARN   as recall, then one ALPHA cycle per neighbourhood step (step s
//              addresses the square of radius r_s around the best match and
//              sends shift a_s; the list goes from the largest square with the
//              smallest factor to the smallest square with the largest), then
//              L x ADAPT, resending the input vector.
//   OP_WRITE / OP_READ  per addressed element: CLR, then L x WRITE (or READ)
//              with that element's row and column line asserted; the weights
//              come from (go to) a 64-byte slot of the data field.
//   OP_MASK    per addressed element: one ALPHA cycle with data bit 7 set,
//              which fades the element out of every later search.
//
// The SRAM read latency is hidden: the next component's address is issued
// while the current one is on the data bus, and component 0 is fetched again
// during the search and alpha cycles, so learning one vector takes exactly
// L + max(d_min, 1) + S + L array cycles (172 for L = 64, d_min = 36, S = 8,
// the paper's count) plus one CLR cycle and two result-write cycles. With ties
// in the search the smallest active row and the smallest active column are
// taken. If no element answers within 2**14 search cycles (all masked) the
// position is reported as 0xFF, 0xFF.
//
// The paper gives the controller's tasks (array clock and control bits, SRAM
// addressing in step with the control sequence, parameter and address fields,
// best-match detection on the lines, the alpha distribution, the interrupt
// when done); the SRAM layout, the job opcodes and the state machine are this
// design's.
module nbisom_ctrl
  import sofm_pkg::*;
#(
  parameter int unsigned MAP_ROWS  = 20,
  parameter int unsigned MAP_COLS  = 20,
  parameter int unsigned AW        = 13,
  parameter int unsigned MAX_STEPS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // job interface (VME-bus controller)
  input  logic                start,
  input  ctrl_op_e            op,
  output logic                busy,
  output logic                done,       // one-cycle pulse at the end of a job
  // dual-port SRAM, port B
  output logic                b_en,
  output logic                b_we,
  output logic [AW-1:0]       b_addr,
  output logic [W_BITS-1:0]   b_wdata,
  input  logic [W_BITS-1:0]   b_rdata,
  // chip array
  output pe_cmd_e             cmd,
  output logic [W_BITS-1:0]   arr_data,
  input  logic [W_BITS-1:0]   arr_rdata,
  input  logic                arr_rdata_oe,
  output logic [MAP_ROWS-1:0] row_drive,
  output logic [MAP_COLS-1:0] col_drive,
  input  logic [MAP_ROWS-1:0] row_line,
  input  logic [MAP_COLS-1:0] col_line
);

  localparam int unsigned NPARAM = 4 + 2 * MAX_STEPS; // bytes of parameters
  localparam int unsigned SRCH_MAX = (1 << D_BITS) - 1;

  typedef enum logic [4:0] {
    S_IDLE, S_PARAM, S_DISPATCH,
    S_VPRIME, S_DIST, S_SEARCH, S_ALPHA, S_ADAPT, S_RES0, S_RES1,
    S_AROW, S_ACOL, S_AGOT, S_MASK, S_WPRIME, S_WR, S_RPRIME, S_RD, S_ANEXT,
    S_DONE
  } state_e;

  state_e     state;
  ctrl_op_e   job;
  logic [7:0] nvec, vlen, nsteps, naddr;
  logic [A_BITS-1:0] step_shift [MAX_STEPS];
  logic [7:0]        step_rad   [MAX_STEPS];
  logic [5:0]  pcnt;          // parameter read index
  logic [7:0]  idx;           // vector or address-list index
  logic [6:0]  k;             // component index
  logic [3:0]  s;             // neighbourhood step index
  logic [D_BITS-1:0] scnt;    // search cycles
  logic [7:0]  best_r, best_c; // best-match position (or addressed element)

  // --- helpers --------------------------------------------------------------
  function automatic logic [AW-1:0] param_addr(input logic [5:0] i);
    if (i == 6'd0)      return AW'(DP_NVEC);
    else if (i == 6'd1) return AW'(DP_VLEN);
    else if (i == 6'd2) return AW'(DP_NSTEPS);
    else if (i == 6'd3) return AW'(DP_NADDR);
    else                return AW'(DP_STEPS) + AW'(i - 6'd4);
  endfunction

  logic [AW-1:0] slot;       // 64-byte slot of the current vector/element
  assign slot = AW'(DP_DATA) + (AW'(idx) << 6);

  logic [7:0] first_row, first_col;
  logic       any_row, any_col;
  always_comb begin
    first_row = NO_MATCH;
    first_col = NO_MATCH;
    for (int i = MAP_ROWS - 1; i >= 0; i--) if (row_line[i]) first_row = 8'(i);
    for (int i = MAP_COLS - 1; i >= 0; i--) if (col_line[i]) first_col = 8'(i);
    any_row = |row_line;
    any_col = |col_line;
  end

  // lines asserted for the square of radius rad around (best_r, best_c)
  logic [MAP_ROWS-1:0] sq_rows, one_row;
  logic [MAP_COLS-1:0] sq_cols, one_col;
  always_comb begin
    for (int i = 0; i < MAP_ROWS; i++) begin
      sq_rows[i] = (i + int'(step_rad[s[2:0]]) >= int'(best_r)) &&
                   (i <= int'(best_r) + int'(step_rad[s[2:0]]));
      one_row[i] = (int'(best_r) == i);
    end
    for (int i = 0; i < MAP_COLS; i++) begin
      sq_cols[i] = (i + int'(step_rad[s[2:0]]) >= int'(best_c)) &&
                   (i <= int'(best_c) + int'(step_rad[s[2:0]]));
      one_col[i] = (int'(best_c) == i);
    end
  end

  // --- outputs (decoded from the state) -------------------------------------
  always_comb begin
    busy      = (state != S_IDLE);
    done      = (state == S_DONE);
    b_en      = 1'b0;
    b_we      = 1'b0;
    b_addr    = '0;
    b_wdata   = '0;
    cmd       = CMD_NOP;
    arr_data  = '0;
    row_drive = '0;
    col_drive = '0;
    unique case (state)
      S_PARAM: begin
        b_en   = (pcnt < 6'(NPARAM));
        b_addr = param_addr(pcnt);
      end
      S_VPRIME, S_WPRIME: begin
        cmd    = CMD_CLR;
        b_en   = 1'b1;
        b_addr = slot;
      end
      S_DIST: begin
        cmd      = CMD_DIST;
        arr_data = b_rdata;
        b_en     = 1'b1;
        b_addr   = (k == 7'(vlen) - 7'd1) ? slot : slot + AW'(k) + AW'(1);
      end
      S_SEARCH: begin
        cmd    = CMD_SEARCH;
        b_en   = 1'b1;
        b_addr = slot;
      end
      S_ALPHA: begin
        cmd       = CMD_ALPHA;
        arr_data  = W_BITS'(step_shift[s[2:0]]);
        row_drive = sq_rows;
        col_drive = sq_cols;
        b_en      = 1'b1;
        b_addr    = slot;
      end
      S_ADAPT: begin
        cmd      = CMD_ADAPT;
        arr_data = b_rdata;
        b_en     = 1'b1;
        b_addr   = slot + AW'(k) + AW'(1);
      end
      S_RES0, S_RES1: begin
        b_en    = 1'b1;
        b_we    = 1'b1;
        b_addr  = AW'(DP_RESULT) + (AW'(idx) << 1) + ((state == S_RES1) ? AW'(1) : AW'(0));
        b_wdata = (state == S_RES1) ? best_c : best_r;
      end
      S_AROW, S_ACOL: begin
        b_en   = 1'b1;
        b_addr = AW'(DP_ADDRS) + (AW'(idx) << 1) + ((state == S_ACOL) ? AW'(1) : AW'(0));
      end
      S_MASK: begin
        cmd       = CMD_ALPHA;
        arr_data  = W_BITS'(1) << ALPHA_MASK_BIT;
        row_drive = one_row;
        col_drive = one_col;
      end
      S_WR: begin
        cmd       = CMD_WRITE;
        arr_data  = b_rdata;
        row_drive = one_row;
        col_drive = one_col;
        b_en      = 1'b1;
        b_addr    = slot + AW'(k) + AW'(1);
      end
      S_RPRIME: cmd = CMD_CLR;
      S_RD: begin
        cmd       = CMD_READ;
        row_drive = one_row;
        col_drive = one_col;
        b_en      = 1'b1;
        b_we      = 1'b1;
        b_addr    = slot + AW'(k);
        b_wdata   = arr_rdata;
      end
      default: ;
    endcase
  end

  // --- sequencing ------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      job    <= OP_NONE;
      nvec   <= '0;
      vlen   <= '0;
      nsteps <= '0;
      naddr  <= '0;
      pcnt   <= '0;
      idx    <= '0;
      k      <= '0;
      s      <= '0;
      scnt   <= '0;
      best_r <= '0;
      best_c <= '0;
      for (int i = 0; i < MAX_STEPS; i++) begin
        step_shift[i] <= '0;
        step_rad[i]   <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start && op != OP_NONE) begin
          job   <= op;
          pcnt  <= '0;
          state <= S_PARAM;
        end
        S_PARAM: begin
          // the byte addressed in the previous cycle is on b_rdata now
          if (pcnt != 6'd0) begin
            unique case (pcnt - 6'd1)
              6'd0: nvec   <= b_rdata;
              6'd1: vlen   <= (b_rdata == 8'd0 || b_rdata > 8'(N_WEIGHTS)) ?
                              8'(N_WEIGHTS) : b_rdata;
              6'd2: nsteps <= (b_rdata > 8'(MAX_STEPS)) ? 8'(MAX_STEPS) : b_rdata;
              6'd3: naddr  <= b_rdata;
              default: begin
                if (pcnt[0]) step_shift[3'((pcnt - 6'd5) >> 1)] <= b_rdata[A_BITS-1:0];
                else         step_rad[3'((pcnt - 6'd5) >> 1)] <= b_rdata;
              end
            endcase
          end
          if (pcnt == 6'(NPARAM)) state <= S_DISPATCH;
          pcnt <= pcnt + 6'd1;
        end
        S_DISPATCH: begin
          idx <= '0;
          if (job == OP_RECALL || job == OP_LEARN)
            state <= (nvec == 8'd0) ? S_DONE : S_VPRIME;
          else if (job == OP_WRITE || job == OP_READ || job == OP_MASK)
            state <= (naddr == 8'd0) ? S_DONE : S_AROW;
          else
            state <= S_DONE;
        end
        // ---- recall / learning, one input vector ----
        S_VPRIME: begin
          k     <= '0;
          state <= S_DIST;
        end
        S_DIST: begin
          k <= k + 7'd1;
          if (k == 7'(vlen) - 7'd1) begin
            scnt  <= '0;
            state <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          scnt <= scnt + 1'b1;
          if (any_row && any_col) begin
            best_r <= first_row;
            best_c <= first_col;
            s      <= '0;
            k      <= '0;
            if (job == OP_LEARN && nsteps != 8'd0) state <= S_ALPHA;
            else                                   state <= S_RES0;
          end else if (scnt == D_BITS'(SRCH_MAX)) begin
            best_r <= NO_MATCH;
            best_c <= NO_MATCH;
            state  <= S_RES0;
          end
        end
        S_ALPHA: begin
          s <= s + 4'd1;
          if (s == 4'(nsteps) - 4'd1) state <= S_ADAPT;
        end
        S_ADAPT: begin
          k <= k + 7'd1;
          if (k == 7'(vlen) - 7'd1) state <= S_RES0;
        end
        S_RES0: state <= S_RES1;
        S_RES1: begin
          idx   <= idx + 8'd1;
          state <= (idx + 8'd1 == nvec) ? S_DONE : S_VPRIME;
        end
        // ---- jobs on addressed elements ----
        S_AROW: state <= S_ACOL;
        S_ACOL: begin
          best_r <= b_rdata;
          state  <= S_AGOT;
        end
        S_AGOT: begin
          best_c <= b_rdata;
          k      <= '0;
          unique case (job)
            OP_MASK:  state <= S_MASK;
            OP_WRITE: state <= S_WPRIME;
            default:  state <= S_RPRIME;
          endcase
        end
        S_MASK:   state <= S_ANEXT;
        S_WPRIME: state <= S_WR;
        S_WR: begin
          k <= k + 7'd1;
          if (k == 7'(vlen) - 7'd1) state <= S_ANEXT;
        end
        S_RPRIME: state <= S_RD;
        S_RD: begin
          k <= k + 7'd1;
          if (k == 7'(vlen) - 7'd1) state <= S_ANEXT;
        end
        S_ANEXT: begin
          idx   <= idx + 8'd1;
          state <= (idx + 8'd1 == naddr) ? S_DONE : S_AROW;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Only an addressed element in a READ cycle may drive the data bus, and
  // the controller never drives lines while the elements search.
  a_bus_read_only : assert property (@(posedge clk) disable iff (!rst_n)
    arr_rdata_oe |-> cmd == CMD_READ);
  a_search_lines_free : assert property (@(posedge clk) disable iff (!rst_n)
    cmd == CMD_SEARCH |-> (row_drive == '0 && col_drive == '0));

endmodule
