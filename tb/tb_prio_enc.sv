// tb_prio_enc: self-checking test of the 72-input priority encoder.
//
// Drives the all-zero vector, every one-hot vector, and random vectors of
// several densities. The reference isolates the lowest set bit with
// v & (~v + 1) and finds its position by comparing with powers of two.
module tb_prio_enc;

  localparam int unsigned N  = 72;
  localparam int unsigned IW = 7;

  logic [N-1:0]  req;
  logic          hit;
  logic [IW-1:0] idx;

  prio_enc dut (.*);

  int checks = 0, failures = 0;

  function automatic int ref_idx(logic [N-1:0] v);
    logic [N-1:0] low;
    low = v & (~v + N'(1));
    for (int i = 0; i < int'(N); i++)
      if (low == (N'(1) << i)) return i;
    return -1;
  endfunction

  task automatic check(logic [N-1:0] v);
    int e;
    req = v;
    #1;
    e = ref_idx(v);
    checks++;
    if ((e < 0 && (hit !== 1'b0 || idx !== '0)) ||
        (e >= 0 && (hit !== 1'b1 || idx !== IW'(e)))) begin
      failures++;
      $display("FAIL: req=%h hit=%0b idx=%0d expected %0d", v, hit, idx, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    for (int i = 0; i < int'(N); i++) check(N'(1) << i);
    for (int i = 0; i < 3000; i++) begin
      logic [95:0] r;
      r = {$urandom, $urandom, $urandom};
      case (i % 3)
        0: check(r[N-1:0]);
        1: check(r[N-1:0] & {$urandom, $urandom, $urandom});
        default: check(r[N-1:0] & {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom}
                       & {$urandom, $urandom, $urandom});
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
