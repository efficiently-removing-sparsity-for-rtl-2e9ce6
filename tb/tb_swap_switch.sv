// tb_swap_switch: exhaustive self-checking test of the 2x2 reverse-butterfly
// switch for a 3-bit index at each of the three steering bits.
//
// For every combination of the two valid bits and the two indices the
// expected routing is derived from where each valid element must go: an
// element whose steering bit is 0 belongs on the upper output, 1 on the lower
// output; an invalid element takes whatever output is left, and with no valid
// element the switch forwards. Both valid with the same steering bit must be
// flagged as a conflict.
module tb_swap_switch;
  localparam int IW = 3;
  localparam int DW = 16;

  int checks = 0, failures = 0;

  logic          av [IW], bv [IW], uv [IW], lv [IW], cf [IW];
  logic [IW-1:0] ai [IW], bi [IW], ui [IW], li [IW];
  logic [DW-1:0] ad [IW], bd [IW], ud [IW], ld [IW];

  for (genvar g = 0; g < IW; g++) begin : g_dut
    swap_switch #(.IDX_W(IW), .DATA_W(DW), .BIT(g)) dut (
      .a_valid(av[g]), .a_index(ai[g]), .a_data(ad[g]),
      .b_valid(bv[g]), .b_index(bi[g]), .b_data(bd[g]),
      .u_valid(uv[g]), .u_index(ui[g]), .u_data(ud[g]),
      .l_valid(lv[g]), .l_index(li[g]), .l_data(ld[g]),
      .conflict(cf[g])
    );
  end

  task automatic check(int g);
    logic a_up, exp_conf;   // a_up: A leaves on the upper output
    bit a_bit, b_bit;
    a_bit = ai[g][g];
    b_bit = bi[g][g];
    exp_conf = av[g] && bv[g] && (a_bit == b_bit);
    if (av[g])      a_up = !a_bit;
    else if (bv[g]) a_up = b_bit;     // B takes its side, A the other
    else            a_up = 1'b1;      // nothing valid: forward
    checks++;
    if (cf[g] !== exp_conf) begin
      failures++;
      $display("bit %0d: conflict %b expected %b", g, cf[g], exp_conf);
    end
    if (!exp_conf) begin
      checks++;
      if (a_up ? ({uv[g], ui[g], ud[g], lv[g], li[g], ld[g]} !== {av[g], ai[g], ad[g], bv[g], bi[g], bd[g]})
               : ({uv[g], ui[g], ud[g], lv[g], li[g], ld[g]} !== {bv[g], bi[g], bd[g], av[g], ai[g], ad[g]})) begin
        failures++;
        $display("bit %0d: wrong routing av=%b ai=%0d bv=%b bi=%0d", g, av[g], ai[g], bv[g], bi[g]);
      end
    end
  endtask

  initial begin
    for (int g = 0; g < IW; g++)
      for (int va = 0; va < 2; va++)
        for (int vb = 0; vb < 2; vb++)
          for (int ia = 0; ia < (1 << IW); ia++)
            for (int ib = 0; ib < (1 << IW); ib++) begin
              av[g] = 1'(va); bv[g] = 1'(vb);
              ai[g] = IW'(ia); bi[g] = IW'(ib);
              ad[g] = DW'($urandom); bd[g] = DW'($urandom);
              if (ad[g] == bd[g]) bd[g] = ~ad[g];
              #1;
              check(g);
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
