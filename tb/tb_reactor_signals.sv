// tb_reactor_signals: random register contents and inputs; each output and
// event is compared with the AND of the flip-flops on its state's path
// written out by hand (e.g. C1 = Process & Reaction & Pouring) and with the
// OR of the event flip-flops for TM1.
module tb_reactor_signals;
  import reactor_pkg::*;
  int unsigned checks = 0, failures = 0;

  reactor_in_t  x;
  reactor_ff_t  q;
  reactor_sig_t sig;
  reactor_out_t y, e;

  reactor_signals dut (.x(x), .q(q), .sig(sig), .y(y));

  task automatic chk(input logic got, input logic exp);
    checks++;
    if (got !== exp) failures++;
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [19:0] s;
      x = reactor_in_t'($urandom);
      q = reactor_ff_t'({$urandom, $urandom});
      s = q.st;
      #1;
      e = '0;
      e.V1 = s[2] & s[7]; e.P = e.V1;
      e.V2 = s[2] & s[10]; e.V4 = s[2] & s[12];
      e.EV = s[1] & s[5]; e.AC1 = s[1] & s[6]; e.AC2 = e.AC1;
      e.C1 = s[4] & s[14] & s[16]; e.C2 = e.C1; e.V3 = e.C1; e.V5 = e.C1;
      e.V6 = (s[4] & s[14] & s[17]) | (s[4] & s[15]);
      e.M  = s[4] & s[14];
      e.TM1 = q.ev[0] | q.ev[1]; e.TM2 = q.ev[2];
      checks++;
      if (y !== e) failures++;
      checks++;
      if (sig.x !== x) failures++;
      chk(sig.lx, s[2] & s[9]);
      chk(sig.ly, s[2] & s[11]);
      chk(sig.lz, s[2] & s[13]);
      chk(sig.TM1, e.TM1);
      chk(sig.TM2, e.TM2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
