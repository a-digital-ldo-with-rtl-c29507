// tb_reg_comp: exhaustive self-checking test of the regulation compensation
// decision. For every combination of fine tick, comparator output and fine
// end flags the expected step request is worked out from the rule: step only
// at a fine sampling instant, and only when the fine word is at the end the
// comparator is pushing towards.
`timescale 1ns/1ps
module tb_reg_comp;
  logic fine_tick, cmp_out, fine_full, fine_empty, comp, up;
  int checks = 0, failures = 0;

  reg_comp dut (.fine_tick, .cmp_out, .fine_full, .fine_empty, .comp, .up);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_comp;
      {fine_tick, cmp_out, fine_full, fine_empty} = v[3:0];
      #1;
      exp_comp = 1'b0;
      if (fine_tick) begin
        if (cmp_out == 1'b1 && fine_full)  exp_comp = 1'b1;  // all fine off, still too high
        if (cmp_out == 1'b0 && fine_empty) exp_comp = 1'b1;  // all fine on, still too low
      end
      checks++;
      if (comp !== exp_comp) begin
        failures++;
        $display("FAIL comp v=%b got %b", v[3:0], comp);
      end
      checks++;
      if (exp_comp && (up !== cmp_out)) begin
        failures++;
        $display("FAIL up v=%b got %b", v[3:0], up);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
