// tb_link_switch: for all four combinations of sender/receiver activity and
// both flow-control types, checks that flits and flow-control wires pass only
// when both ends are active, and otherwise read as idle flit and no credit
// (credit) or busy (peek).
module tb_link_switch;
  import noc_pkg::*;
  logic sa, da;
  flit_t fin, fout_c, fout_p;
  logic [1:0] fcin, fcout_c, fcout_p;
  int checks = 0, failures = 0;

  link_switch #(.NUM_VC(2), .FC(FC_CREDIT)) dut   (.src_active(sa), .dst_active(da), .flit_in(fin),
                                                   .flit_out(fout_c), .fc_in(fcin), .fc_out(fcout_c));
  link_switch #(.NUM_VC(2), .FC(FC_PEEK))   dut_p (.src_active(sa), .dst_active(da), .flit_in(fin),
                                                   .flit_out(fout_p), .fc_in(fcin), .fc_out(fcout_p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      bit on;
      sa = 1'($urandom); da = 1'($urandom);
      fin = flit_t'({$urandom, $urandom});
      fin.valid = 1'b1;
      fcin = 2'($urandom);
      #1;
      on = sa && da;
      checks += 4;
      if (fout_c != (on ? fin : flit_t'('0)))  begin failures++; $display("credit flit wrong sa=%0b da=%0b", sa, da); end
      if (fout_p != (on ? fin : flit_t'('0)))  begin failures++; $display("peek flit wrong"); end
      if (fcout_c != (on ? fcin : 2'b00))      begin failures++; $display("credit fc wrong sa=%0b da=%0b", sa, da); end
      if (fcout_p != (on ? fcin : 2'b11))      begin failures++; $display("peek fc wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
