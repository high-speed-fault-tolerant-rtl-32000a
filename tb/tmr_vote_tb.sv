// tmr_vote_tb: self-checking testbench of the majority voter.
//
// For random words it checks agreement of all copies, a random set of bits
// flipped in any one copy (output must equal the word, mismatch raised), and
// the same bit flipped in two copies (output takes the majority value).
module tmr_vote_tb;
  localparam int unsigned W = 37;
  logic [W-1:0] a, b, c, y, v, m;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_vote #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom});
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      v = rnd();
      m = rnd() | W'(1);
      a = v; b = v; c = v;
      #1; checks++;
      if (y !== v || mismatch !== 1'b0) begin failures++; $display("agree case"); end
      case (t % 3)
        0: a = v ^ m;
        1: b = v ^ m;
        default: c = v ^ m;
      endcase
      #1; checks++;
      if (y !== v || mismatch !== 1'b1) begin failures++; $display("one copy case %0d", t % 3); end
      a = v ^ m; b = v ^ m; c = v;
      #1; checks++;
      if (y !== (v ^ m) || mismatch !== 1'b1) begin failures++; $display("two copies case"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
