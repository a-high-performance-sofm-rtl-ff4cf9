// tb_pe_calc: self-checking test of the calculation unit against integer
// arithmetic: |x - w| accumulation (with restart), saturating decrement and
// the shift-based adaptation w + floor((x - w) / 2**shift), for corner values
// and random operands.
module tb_pe_calc;
  logic [7:0] x, w, w_new;
  logic [13:0] d_cur, dist_acc, dist_dec;
  logic first;
  logic [2:0] shift;
  int checks = 0, failures = 0;
  int e_acc, e_dec, e_w, diff;

  pe_calc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int floordiv(int a, int p);
    int q = a / p;
    if (a % p != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = 8'($urandom); w = 8'($urandom);
      d_cur = (i % 7 == 0) ? 14'(i % 3) : 14'($urandom % 16000);
      first = ($urandom % 4) == 0;
      shift = 3'($urandom);
      if (i == 0) begin x = 0;   w = 255; end
      if (i == 1) begin x = 255; w = 0;   end
      if (i == 2) begin d_cur = 14'h3FFF; first = 0; x = 9; w = 0; end
      #1;
      diff  = int'(x) - int'(w);
      e_acc = (first ? 0 : int'(d_cur)) + (diff < 0 ? -diff : diff);
      if (e_acc > 16383) e_acc = 16383;
      e_dec = (d_cur == 0) ? 0 : int'(d_cur) - 1;
      e_w   = int'(w) + floordiv(diff, 1 << shift);
      check(dist_acc == 14'(e_acc), $sformatf("acc x=%0d w=%0d d=%0d f=%0d", x, w, d_cur, first));
      check(dist_dec == 14'(e_dec), "dec");
      check(int'(w_new) == e_w, $sformatf("adapt x=%0d w=%0d s=%0d got %0d", x, w, shift, w_new));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
