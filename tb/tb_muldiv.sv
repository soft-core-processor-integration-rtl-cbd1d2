// tb_muldiv: random multiply, divide and HI/LO moves on random threads,
// with random write enables and pipeline enables, checked against a
// per-thread reference model; includes the corner operands 0, 1, -1 and
// the most negative number, and division by zero.
module tb_muldiv;
  import nmpra_pkg::*;
  localparam int N = 4;
  logic clock = 0, reset = 1, en = 1, we = 0;
  logic [1:0] sel = 0;
  alu_op_t op = ALU_MULT;
  logic [31:0] a = 0, b = 0, hi, lo;
  logic [31:0] m_hi [N], m_lo [N];
  int checks = 0, failures = 0;

  muldiv #(.NTHREADS(N)) dut (.clock, .reset, .task_select(sel), .en_scpu(en), .write_en(we),
                              .operation(op), .a, .b, .hi, .lo);

  always #5 clock = ~clock;
  initial begin repeat (20000) @(posedge clock); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (op %s a %h b %h)", what, got, exp, op.name(), a, b); end
  endtask

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 6))
      0: return 32'h0;  1: return 32'h1;  2: return 32'hFFFF_FFFF;  3: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction

  // reference, written with 64-bit arithmetic
  task automatic model();
    longint sa, sb;
    logic [63:0] p;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    case (op)
      ALU_MULT:  begin p = 64'(sa * sb); m_hi[sel] = p[63:32]; m_lo[sel] = p[31:0]; end
      ALU_MULTU: begin p = {32'h0, a} * {32'h0, b}; m_hi[sel] = p[63:32]; m_lo[sel] = p[31:0]; end
      ALU_DIV:   if (b == 0) begin m_lo[sel] = '1; m_hi[sel] = a; end
                 else begin m_lo[sel] = 32'(sa / sb); m_hi[sel] = 32'(sa - (sa / sb) * sb); end
      ALU_DIVU:  if (b == 0) begin m_lo[sel] = '1; m_hi[sel] = a; end
                 else begin m_lo[sel] = a / b; m_hi[sel] = a % b; end
      ALU_MTHI:  m_hi[sel] = a;
      ALU_MTLO:  m_lo[sel] = a;
      default: ;
    endcase
  endtask

  alu_op_t ops [10] = '{ALU_MULT, ALU_MULTU, ALU_DIV, ALU_DIVU, ALU_MTHI, ALU_MTLO, ALU_MFHI, ALU_MFLO, ALU_ADD, ALU_OR};

  initial begin
    for (int i = 0; i < N; i++) begin m_hi[i] = 0; m_lo[i] = 0; end
    @(posedge clock); #1 reset = 0;
    for (int n = 0; n < 8000; n++) begin
      sel = 2'($urandom); op = ops[$urandom_range(0, 9)]; a = pick(); b = pick();
      we = ($urandom_range(0, 4) != 0); en = ($urandom_range(0, 7) != 0);
      #1;
      chk("hi before", hi, m_hi[sel]); chk("lo before", lo, m_lo[sel]);
      @(posedge clock);
      if (we && en) model();
      #1;
      chk("hi after", hi, m_hi[sel]); chk("lo after", lo, m_lo[sel]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
