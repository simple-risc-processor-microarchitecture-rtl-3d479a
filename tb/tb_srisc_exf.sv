// tb_srisc_exf: random FADD, FSUB and FMUL through the floating point unit,
// compared bit for bit with the host's double precision arithmetic rounded
// to single precision (to nearest even, flush to zero, overflow to
// infinity). Operands include zeros (also both zero, of either sign), equal
// and opposite values (exact cancellation), widely different exponents and
// products that overflow or underflow. The write-back grant is withheld at
// random after the first phase; in the first phase every result must appear
// four cycles after dispatch, and results must always come out in dispatch
// order.
`timescale 1ns/1ps
module tb_srisc_exf;
  import srisc_pkg::*;
  import srisc_tb_pkg::*;

  logic    clk = 1'b0, rst_n, in_valid, ready, done_valid, grant;
  ex_pkt_t in_pkt;
  wb_pkt_t done_pkt;

  srisc_exf dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  ex_pkt_t q[$];
  int      sent_at[$];

  function automatic word_t ref_result(ex_pkt_t p);
    real a, b;
    a = f32_to_real(p.a);
    b = f32_to_real(p.b);
    case (p.op)
      OP_FADD: return real_to_f32(a + b);
      OP_FSUB: return real_to_f32(a - b);
      default: return real_to_f32(a * b);
    endcase
  endfunction

  initial begin
    ex_pkt_t p;
    int      k, phase_free;
    word_t   e;
    rst_n = 0; in_valid = 0; in_pkt = '0; grant = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      phase_free = (c < 2000);
      p = '0;
      k = $urandom_range(2);
      p.op = k == 0 ? OP_FADD : k == 1 ? OP_FSUB : OP_FMUL;
      p.has_dest = 1; p.dest = preg_t'($urandom_range(NPHYS - 1));
      p.iw_idx = iwidx_t'($urandom);
      k = $urandom_range(9);
      if (k < 5) begin
        p.a = rand_f32(100, 128); p.b = rand_f32(100, 128);
      end else if (k == 5) begin
        p.a = rand_f32(1, 254); p.b = rand_f32(1, 254);
      end else if (k == 6) begin
        p.a = rand_f32(100, 150); p.b = p.a ^ (1'($urandom) ? 32'h8000_0000 : 32'h0);
      end else if (k == 7) begin
        p.a = rand_f32(100, 150); p.b = {p.a[31:3], 3'($urandom)};
      end else if (k == 8) begin
        p.a = rand_f32(100, 150); p.b = 1'($urandom) ? 32'h0 : 32'h8000_0000;
        if (1'($urandom)) {p.a, p.b} = {p.b, p.a};
        if ($urandom_range(3) == 0) p.a = {1'($urandom), 31'd0};
      end else begin
        p.a = rand_f32(1, 30); p.b = rand_f32(200, 254);
        if (1'($urandom)) {p.a, p.b} = {p.b, p.a};
      end
      in_pkt = p;
      in_valid = phase_free ? ($urandom_range(2) != 0) : 1'($urandom);
      grant = phase_free ? done_valid : (done_valid && 1'($urandom));
      #1;
      if (done_valid) begin
        checks++;
        e = ref_result(q[0]);
        if (done_pkt.result != e || done_pkt.dest != q[0].dest
            || done_pkt.iw_idx != q[0].iw_idx || !done_pkt.has_dest || done_pkt.is_load || done_pkt.redirect) begin
          failures++;
          $display("FAIL %s %h %h -> %h expected %h", q[0].op.name(), q[0].a, q[0].b, done_pkt.result, e);
        end
        if (phase_free) begin
          checks++;
          if (cyc - sent_at[0] != 4) begin failures++; $display("FAIL latency %0d", cyc - sent_at[0]); end
        end
      end
      @(posedge clk);
      if (done_valid && grant) begin void'(q.pop_front()); void'(sent_at.pop_front()); end
      if (ready && in_valid) begin q.push_back(p); sent_at.push_back(cyc); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
