// tb_awm_final_adder: checks the ripple final adder at its default (all
// columns occupied) 16-bit size. With exact cells it must compute
// (x + y) mod 2^16 for random and corner operands; with each inexact
// compressor and the inexact half adder it must match the bit-level
// reference ripple model.
module tb_awm_final_adder;
  import awm_pkg::*;
  import awm_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 2 * N;

  logic [W-1:0] x, y;
  logic [4:0][W-1:0] p;
  int checks = 0, failures = 0;

  awm_final_adder #(.N(N), .DESIGN(FA_EXACT), .HA_INEXACT(1'b0)) u0 (.x, .y, .p(p[0]));
  awm_final_adder #(.N(N), .DESIGN(FA_D1)) u1 (.x, .y, .p(p[1]));
  awm_final_adder #(.N(N), .DESIGN(FA_D2)) u2 (.x, .y, .p(p[2]));
  awm_final_adder #(.N(N), .DESIGN(FA_D3)) u3 (.x, .y, .p(p[3]));
  awm_final_adder #(.N(N), .DESIGN(FA_D4)) u4 (.x, .y, .p(p[4]));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t rx, ry;
    logic [W-1:0] sum, e;
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin x = '0; y = '0; end
        1: begin x = '1; y = 1; end
        2: begin x = '1; y = '1; end
        default: begin x = W'($urandom); y = W'($urandom); end
      endcase
      #1;
      sum = x + y;
      checks++;
      if (p[0] !== sum) begin
        failures++;
        if (failures < 10) $display("FAIL exact %h+%h=%h exp %h", x, y, p[0], sum);
      end
      rx.v = 64'(x); rx.p = 64'(16'hFFFF);
      ry.v = 64'(y); ry.p = 64'(16'hFFFF);
      for (int d = 1; d < 5; d++) begin
        e = W'(ripple(N, d, 1'b1, rx, ry));
        checks++;
        if (p[d] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL design %0d %h+%h=%h exp %h", d, x, y, p[d], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
