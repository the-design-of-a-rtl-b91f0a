// tb_operand_examine: self-checking test of operand examination.
// For random operands of every length, both signed and unsigned, checks the
// magnitude, leading-zero count, zero / one / below-2^13 / negative flags
// and the normalised value against values computed in the testbench.
module tb_operand_examine;
  import mdu_pkg::*;
  logic [63:0] val, mag, norm;
  logic        is_signed;
  opinfo_t     info;
  logic [5:0]  shift;
  int checks = 0, failures = 0;

  operand_examine dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] v, input logic s);
    logic [63:0] m;
    int lz;
    logic ng;
    val = v; is_signed = s;
    #1;
    ng = s && v[63];
    m = ng ? -v : v;
    lz = 64;
    for (int i = 63; i >= 0; i--) if (m[i]) begin lz = 63 - i; break; end
    checks++;
    if (mag !== m || info.lzc !== 7'(lz) || info.zero !== (m == 0) || info.one !== (m == 1) ||
        info.shortop !== (m < 64'd8192) || info.neg !== ng ||
        (m != 0 && (norm !== (m << lz) || shift !== 6'(lz)))) begin
      failures++;
      $display("FAIL v=%h s=%0d mag=%h lzc=%0d exp %0d norm=%h", v, s, mag, info.lzc, lz, norm);
    end
  endtask

  initial begin
    chk(0, 0); chk(0, 1); chk(1, 0); chk(1, 1); chk('1, 1); chk('1, 0);
    chk(64'd8191, 0); chk(64'd8192, 0); chk(-64'd8191, 1); chk(-64'd8192, 1);
    chk(64'h8000_0000_0000_0000, 1);
    for (int t = 0; t < 3000; t++) chk({$urandom, $urandom} >> $urandom_range(0, 63), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
