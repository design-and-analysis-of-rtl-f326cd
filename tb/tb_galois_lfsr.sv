// tb_galois_lfsr: runs the LFSR for several periods and checks that
//  - the state sequence has period 31 and visits all 31 non-zero states,
//  - every state bit obeys the recurrence of G(x) = x^5 + x^2 + 1,
//    s[n+5] = s[n+2] ^ s[n], as an m-sequence of that polynomial must,
//  - the state after reset is the seed and a low enable holds the state.
module tb_galois_lfsr;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [4:0] st;
  logic       ob;
  logic [4:0] seq [$];
  bit         seen [32];
  int         checks = 0, failures = 0;

  galois_lfsr dut (.clk (clk), .rst_n (rst_n), .en (en), .state (st), .out (ob));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (st !== 5'b00001) begin failures++; $display("reset state %b", st); end
    @(negedge clk) rst_n = 1'b1;
    seq.push_back(st);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom % 3 != 0);
      @(posedge clk); #1;
      if (en) seq.push_back(st);
      else begin
        checks++;
        if (st !== seq[seq.size() - 1]) begin failures++; $display("state moved with enable low"); end
      end
      checks++;
      if (ob !== st[4]) begin failures++; $display("out is not the top state bit"); end
    end
    for (int n = 0; n + 5 < seq.size(); n++) begin
      checks++;
      if (seq[n+5] !== (seq[n+2] ^ seq[n])) begin
        failures++; $display("recurrence broken at %0d", n);
      end
      if (n + 31 < seq.size()) begin
        checks++;
        if (seq[n+31] !== seq[n]) begin failures++; $display("period is not 31 at %0d", n); end
      end
    end
    for (int n = 0; n < 31; n++) seen[seq[n]] = 1'b1;
    for (int v = 1; v < 32; v++) begin
      checks++;
      if (!seen[v]) begin failures++; $display("state %0d never visited", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
