// Self-checking testbench of bted_encoder.
// Reference: e = d ^ (d << 1) ^ mask, with mask = FI on odd bits and FI^HI on even bits,
// built from constant patterns rather than bit by bit. Also checks the transition count
// of the alternating word 16'hAAAA (15 toggles before, 1 after, with FI = HI = 0).
module tb_bted_encoder;
  localparam int W = 16;
  logic fi, hi;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  bted_encoder #(.DATA_W(W)) dut (.fi, .hi, .data_in(din), .data_out(dout));

  function automatic logic [W-1:0] ref_enc(logic [W-1:0] d, logic f, logic h);
    logic [W-1:0] odd_bits;
    odd_bits = {(W/2){2'b10}};
    return d ^ (d << 1) ^ ({W{f}} & odd_bits) ^ ({W{f ^ h}} & ~odd_bits);
  endfunction

  function automatic int toggles(logic [W-1:0] v);
    int t = 0;
    for (int i = 1; i < W; i++) t += int'(v[i] != v[i-1]);
    return t;
  endfunction

  task automatic check(logic [W-1:0] d, logic f, logic h);
    fi = f; hi = h; din = d;
    #1;
    checks++;
    if (dout !== ref_enc(d, f, h)) begin
      failures++;
      $display("FAIL d=%h fi=%b hi=%b got %h exp %h", d, f, h, dout, ref_enc(d, f, h));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hAAAA, 0, 0);
    checks++;
    if (!(toggles(16'hAAAA) == 15 && toggles(dout) == 1 && dout == 16'hFFFE)) begin
      failures++;
      $display("FAIL alternating word: %h (%0d toggles)", dout, toggles(dout));
    end
    check(16'h0000, 1, 1);
    check(16'hFFFF, 1, 0);
    for (int k = 0; k < 400; k++) check(W'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
