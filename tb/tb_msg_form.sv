// tb_msg_form: Form multiplies every symbol of a message by h, Form*
// divides; checked against a bit-serial product for random messages and
// every non-zero h, and Form* after Form must give the message back with
// its LLRs untouched.
module tb_msg_form;
  import gf_pkg::*;
  msg_t [NM-1:0] in_msg, mid, back;
  gf_t h;
  int checks = 0, failures = 0;

  msg_form #(.NM(NM)) u_fwd (.in_msg(in_msg), .h(h), .inv(1'b0), .out_msg(mid));
  msg_form #(.NM(NM)) u_inv (.in_msg(mid), .h(h), .inv(1'b1), .out_msg(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int hv = 1; hv < GF_Q; hv++) begin
      for (int t = 0; t < 4; t++) begin
        h = gf_t'(hv);
        for (int i = 0; i < NM; i++) begin
          in_msg[i].llr = llr_t'($urandom);
          in_msg[i].gf  = gf_t'($urandom);
        end
        #1;
        for (int i = 0; i < NM; i++) begin
          logic [7:0] p;
          p = gf_mul_m(8'(in_msg[i].gf), 8'(hv), GF_M);
          checks++;
          if (mid[i].gf != p[GF_M-1:0] || mid[i].llr != in_msg[i].llr || back[i] != in_msg[i]) begin
            failures++;
            if (failures < 10) $display("FAIL h=%0d entry %0d: %0d -> %0d -> %0d", hv, i, in_msg[i].gf, mid[i].gf, back[i].gf);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
