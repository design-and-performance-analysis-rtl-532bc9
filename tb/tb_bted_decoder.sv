// Self-checking testbench of bted_decoder.
// A reference encoder (e = d ^ (d << 1) ^ mask) produces the received word from a random
// payload; the decoder must return the payload for every FI/HI setting.
module tb_bted_decoder;
  localparam int W = 16;
  logic fi, hi;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  bted_decoder #(.DATA_W(W)) dut (.fi, .hi, .data_in(din), .data_out(dout));

  function automatic logic [W-1:0] ref_enc(logic [W-1:0] d, logic f, logic h);
    logic [W-1:0] odd_bits;
    odd_bits = {(W/2){2'b10}};
    return d ^ (d << 1) ^ ({W{f}} & odd_bits) ^ ({W{f ^ h}} & ~odd_bits);
  endfunction

  task automatic check(logic [W-1:0] d, logic f, logic h);
    fi = f; hi = h; din = ref_enc(d, f, h);
    #1;
    checks++;
    if (dout !== d) begin
      failures++;
      $display("FAIL payload=%h fi=%b hi=%b received %h decoded %h", d, f, h, din, dout);
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
    check(16'h11B4, 1, 1);
    check(16'h8001, 1, 0);
    for (int k = 0; k < 400; k++) check(W'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
