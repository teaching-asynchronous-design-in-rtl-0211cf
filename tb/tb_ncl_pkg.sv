// tb_ncl_pkg: self-checking testbench of the dual-rail helper functions.
//
// Every one of the four two-wire codes is classified (NULL, DATA0, DATA1,
// illegal) and checked against the encoding table; encode/decode round trips
// and the rail-swap inverse are checked for both Boolean values, and the
// inverse is checked to keep NULL as NULL.
module tb_ncl_pkg;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dr_t d;
    for (int c = 0; c < 4; c++) begin
      d = dr_t'(c[1:0]);   // {r1, r0}
      check(is_null(d)    == (d.r1 == 0 && d.r0 == 0), "is_null");
      check(is_data(d)    == (d.r1 != d.r0),           "is_data");
      check(is_illegal(d) == (d.r1 == 1 && d.r0 == 1), "is_illegal");
      case ({d.r1, d.r0})
        2'b00: check(dr_state(d) == DR_NULL,    "state NULL");
        2'b01: check(dr_state(d) == DR_DATA0,   "state DATA0");
        2'b10: check(dr_state(d) == DR_DATA1,   "state DATA1");
        2'b11: check(dr_state(d) == DR_ILLEGAL, "state illegal");
      endcase
      #1;
    end
    for (int b = 0; b < 2; b++) begin
      d = encode(b[0]);
      check(d.r1 == b[0] && d.r0 == !b[0], "encode rails");
      check(is_data(d), "encode gives DATA");
      check(decode(d) == b[0], "decode");
      check(decode(dr_not(d)) == !b[0], "invert DATA");
      check(is_data(dr_not(d)), "invert keeps DATA");
    end
    check(is_null(dr_not(dr_t'(2'b00))), "invert keeps NULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
