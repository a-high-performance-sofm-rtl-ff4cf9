// tb_pe_ctrl: exhaustive self-checking test of the element's controlling
// unit: every command against every combination of row line, column line,
// data bit 7, distance flags, alpha-valid and mask flag, compared with the
// command table written out independently below.
module tb_pe_ctrl;
  import sofm_pkg::*;
  pe_cmd_e cmd;
  logic row_line, col_line, data_msb, dist_zero, dist_one, alpha_valid, masked;
  logic cnt_clr, cnt_inc, mem_we, mem_sel_adapt, dist_load, dist_sel_dec;
  logic alpha_clear, alpha_load, mask_set, data_oe, pull;
  int checks = 0, failures = 0;
  logic [10:0] got, exp;
  logic a;

  pe_ctrl dut (.*);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int v = 0; v < 128; v++) begin
        cmd = pe_cmd_e'(c);
        {row_line, col_line, data_msb, dist_zero, dist_one, alpha_valid, masked} = 7'(v);
        if (dist_zero && dist_one) continue;
        #1;
        a = row_line & col_line;
        // {clr, inc, we, sel_adapt, dload, dsel_dec, aclear, aload, mset, oe, pull}
        case (c)
          0: exp = 11'b0;
          1: exp = 11'b100_0000_0000;
          2: exp = 11'b010_0101_0000;
          3: exp = {2'b10, 4'b0011, 4'b0000, !masked & (dist_zero | dist_one)};
          4: exp = {1'b1, 6'b0, a & !data_msb, a & data_msb, 2'b00};
          5: exp = {1'b0, 1'b1, alpha_valid & !masked, 1'b1, 7'b0};
          6: exp = {1'b0, 1'b1, a, 8'b0};
          default: exp = {1'b0, 1'b1, 7'b0, a, 1'b0};
        endcase
        got = {cnt_clr, cnt_inc, mem_we, mem_sel_adapt, dist_load, dist_sel_dec,
               alpha_clear, alpha_load, mask_set, data_oe, pull};
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL cmd=%0d in=%b got=%b exp=%b", c, 7'(v), got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
