// tb_ncl_reg: self-checking testbench of the NCL register (default 2 bits).
//
// Walks the register through its handshake cases with independently worked
// out expectations:
//   - reset: outputs NULL, ko = 1 (DATA requested);
//   - ki = 1, inputs turning DATA one bit at a time: each bit passes at once,
//     ko stays 1 until the last bit is DATA, then falls;
//   - ki = 1, inputs back to NULL: the DATA is held (the next stage has not
//     acknowledged yet), ko stays 0;
//   - ki = 0 with NULL inputs: outputs go NULL, ko rises;
//   - ki = 0 with new DATA at the inputs: the DATA is blocked;
//   - ki = 1 again: the blocked DATA passes.
// Repeated for random values.
module tb_ncl_reg;
  import ncl_pkg::*;

  localparam int W = 2;

  int checks = 0;
  int failures = 0;

  logic          rst;
  logic          ki, ko;
  dr_t [W-1:0]   d, q;

  ncl_reg dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (q=%b ko=%b)", what, $time, q, ko);
    end
  endtask

  function automatic dr_t [W-1:0] enc(logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = encode(v[i]);
    return r;
  endfunction

  initial begin
    logic [W-1:0] v, v2;
    rst = 1'b1; ki = 1'b1; d = '0;
    #1;
    check(q == '0 && ko == 1'b1, "reset: NULL, DATA requested");
    rst = 1'b0;
    #1;
    check(q == '0 && ko == 1'b1, "after reset");

    for (int n = 0; n < 200; n++) begin
      v  = W'($urandom);
      v2 = W'($urandom);
      // DATA arrives bit by bit while DATA is requested.
      for (int i = 0; i < W; i++) begin
        d[i] = encode(v[i]);
        #1;
        check(q[i] == encode(v[i]), "bit passes while ki=1");
        if (i < W - 1) check(ko == 1'b1, "ko waits for all bits");
        else           check(ko == 1'b0, "ko falls on complete DATA");
      end
      // Inputs return to NULL: DATA held until acknowledged.
      d = '0;
      #1;
      check(q == enc(v) && ko == 1'b0, "DATA held against NULL input");
      // Acknowledge: NULL passes.
      ki = 1'b0;
      #1;
      check(q == '0 && ko == 1'b1, "NULL passes after ki falls");
      // New DATA is blocked while NULL is requested.
      d = enc(v2);
      #1;
      check(q == '0 && ko == 1'b1, "DATA blocked while ki=0");
      ki = 1'b1;
      #1;
      check(q == enc(v2) && ko == 1'b0, "blocked DATA passes when ki rises");
      // Back to the idle NULL state.
      ki = 1'b0;
      d  = '0;
      #1;
      check(q == '0 && ko == 1'b1, "back to NULL");
      ki = 1'b1;
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
