// tb_majority_voter: self-checking test of the bit-level 2-of-3 voter.
//
// Random frames with upsets injected into one or two modules; the expected
// vote is counted bit by bit (a cell is 1 when at least two copies hold 1),
// and the per-module error masks and the disagree flag are checked against it.
module tb_majority_voter;
  localparam int W = 126;
  logic [W-1:0] a, b, c, v, e1, e2, e3;
  logic dis;
  int checks = 0, failures = 0;

  majority_voter #(.W(W)) dut (.m1(a), .m2(b), .m3(c), .voted(v), .err1(e1), .err2(e2), .err3(e3), .disagree(dis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] base, ev;
      bit any;
      int idx;
      for (int k = 0; k < W; k += 32) base[k +: 32] = $urandom;
      a = base; b = base; c = base;
      case (n % 5)
        0: ;
        1: a[$urandom_range(W-1)] ^= 1'b1;
        2: b[$urandom_range(W-1)] ^= 1'b1;
        3: begin idx = $urandom_range(W-1); c[idx] ^= 1'b1; a[(idx + 1) % W] ^= 1'b1; end
        default: for (int k = 0; k < W; k += 32) begin a[k +: 32] ^= $urandom; c[k +: 32] ^= $urandom; end
      endcase
      #1;
      any = 0;
      for (int i = 0; i < W; i++) begin
        int ones;
        ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
        ev[i] = (ones >= 2);
        if (!(a[i] == b[i] && b[i] == c[i])) any = 1;
      end
      checks++; if (v !== ev) begin failures++; $display("FAIL vote n=%0d", n); end
      checks++; if (e1 !== (a ^ ev) || e2 !== (b ^ ev) || e3 !== (c ^ ev)) begin failures++; $display("FAIL masks n=%0d", n); end
      checks++; if (dis !== any) begin failures++; $display("FAIL disagree n=%0d", n); end
      if (n % 5 == 3 && v !== base) begin
        // two different cells upset in two modules: vote must still be the original
        checks++; failures++; $display("FAIL recovery n=%0d", n);
      end else if (n % 5 == 3) checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
