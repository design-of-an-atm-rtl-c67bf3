// Testbench for comparison_unit: all 64 input combinations against the four
// truth tables of the unit (schedule, output status update, blocking signal,
// fairness distribution), written out row by row.
module tb_comparison_unit;
  logic i, x, p, up, f, fairness;
  logic e_tmp, down, x_out, t;
  int checks = 0, failures = 0;

  comparison_unit dut (.*);

  function automatic logic tab_e(logic ii, logic xx, logic uu);
    // schedule only when enabled (up = 0) and both ports free
    case ({uu, ii, xx})
      3'b000:  return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic tab_x(logic uu, logic ii, logic xx);
    if (xx) return 1'b1;                 // - - 1 -> 1
    case ({uu, ii})
      2'b00:   return 1'b1;              // 0 0 0 -> 1
      default: return 1'b0;              // 0 1 0, 1 0 0, 1 1 0 -> 0
    endcase
  endfunction

  function automatic logic tab_down(logic ii, logic xx, logic pp, logic uu);
    if (uu) return 1'b1;                 // disabled: block the rest
    if (pp) return 1'b1;                 // threshold reached
    return (ii == 1'b0 && xx == 1'b0);   // schedule found here
  endfunction

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic xt;
      {i, x, p, up, f, fairness} = 6'(v);
      #1;
      xt = tab_x(up, i, x);
      checks++;
      if (e_tmp !== tab_e(i, x, up)) begin failures++; $display("FAIL e v=%b", 6'(v)); end
      checks++;
      if (down !== tab_down(i, x, p, up)) begin failures++; $display("FAIL down v=%b", 6'(v)); end
      checks++;
      if (x_out !== (fairness ? f : xt)) begin failures++; $display("FAIL x_out v=%b", 6'(v)); end
      checks++;
      if (t !== (fairness ? xt : 1'b0)) begin failures++; $display("FAIL t v=%b", 6'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
