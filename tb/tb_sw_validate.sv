// tb_sw_validate: exhaustive self-checking test of the mode requirements.
// Walks every mode and every combination of the event flags and compares
// with a reference written directly from the requirement lists, one mode at
// a time.
`timescale 1ns/1ps
module tb_sw_validate;
  logic [3:0] mode;
  logic sf, sfr, one_pos, energy, multi_e, e_hk, ofw, tof_ok, e_ok, ssd_disable;
  logic valid, e_not_rqd, e_rqd;
  int checks = 0, failures = 0;

  sw_validate dut (.*);

  function automatic logic [2:0] ref_model();
    logic v, n, r, nm, nh, no;
    nm = !multi_e; nh = !e_hk; no = !ofw;
    v = 0; n = 0; r = 0;
    case (mode)
      0: begin v = sf && sfr && one_pos && energy && (ssd_disable || (nm && nh)) && no;
               n = sf && sfr && one_pos && no; r = sf && sfr && one_pos && energy && nm && nh && no; end
      1: begin v = sf && sfr && one_pos && (ssd_disable || (nm && nh)) && no;
               n = sf && sfr && one_pos && no; r = sf && sfr && one_pos && energy && nm && nh && no; end
      2: begin v = sf && sfr && energy && (ssd_disable || (nm && nh)) && no;
               n = sf && sfr && no; r = sf && sfr && energy && nm && nh && no; end
      3: begin v = sf && sfr && (ssd_disable || (nm && nh)) && no;
               n = sf && sfr && no; r = sf && sfr && energy && nm && nh && no; end
      4: begin v = sf && one_pos && energy && (ssd_disable || (nm && nh));
               n = sf && one_pos; r = sf && one_pos && energy && nm && nh; end
      5: begin v = sf && one_pos && (ssd_disable || (nm && nh));
               n = sf && one_pos; r = sf && one_pos && energy && nm && nh; end
      8: begin v = one_pos && energy && (ssd_disable || (nm && nh));
               n = one_pos; r = one_pos && energy && nm && nh; end
      9: begin v = one_pos && (ssd_disable || (nm && nh));
               n = one_pos; r = one_pos && energy && nm && nh; end
      10: begin v = energy && (ssd_disable || (nm && nh)); n = 0; r = energy && nm && nh; end
      default: ;
    endcase
    if (mode < 4 && !tof_ok) v = 0;
    if (energy && !e_ok) v = 0;
    return {v, n, r};
  endfunction

  initial begin
    for (int m = 0; m < 16; m++)
      for (int f = 0; f < 1024; f++) begin
        mode = 4'(m);
        {sf, sfr, one_pos, energy, multi_e, e_hk, ofw, tof_ok, e_ok, ssd_disable} = 10'(f);
        #1;
        checks++;
        if ({valid, e_not_rqd, e_rqd} !== ref_model()) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d flags %b: got %b exp %b", m, 10'(f), {valid, e_not_rqd, e_rqd}, ref_model());
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
