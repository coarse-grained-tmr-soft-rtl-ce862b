// tb_tmr_voter: checks the majority output and the faulty-copy flags of the
// voter with random words, with no fault, with one faulty copy at a time and
// with all three copies different.
module tb_tmr_voter;
  logic [15:0] a, b, c, y;
  logic [2:0]  err;
  int checks = 0, failures = 0;

  tmr_voter #(.WIDTH(16)) dut (.in0(a), .in1(b), .in2(c), .y, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [15:0] v, f;
      v = 16'($urandom); f = 16'($urandom) | 16'h0001;   // f != 0
      a = v; b = v; c = v; #1;
      check(y == v && err == 3'b000, "no fault");
      for (int k = 0; k < 3; k++) begin
        a = v; b = v; c = v;
        if (k == 0) a = v ^ f; else if (k == 1) b = v ^ f; else c = v ^ f;
        #1;
        check(y == v, $sformatf("copy %0d masked", k));
        check(err == 3'(1 << k), $sformatf("copy %0d flagged, err=%b", k, err));
      end
      a = 16'h00FF; b = 16'h0F0F; c = 16'h3333; #1;
      check(y == 16'h033F, "bitwise majority of three different words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
