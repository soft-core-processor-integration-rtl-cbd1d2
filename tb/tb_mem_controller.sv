// tb_mem_controller: byte, halfword and word stores and loads on every
// alignment (big-endian lanes, sign and zero extension), address errors with
// no access, the kill input, and the stall while the memory is not ready.
// LWL/LWR/SWL/SWR are checked on every offset with random data against a
// byte-by-byte model of the big-endian merge, and again in reverse-endian
// mode, where byte and halfword lanes are mirrored.
module tb_mem_controller;
  logic lft = 0, rgt = 0, rev = 0;
  logic rd, wr, bt, hf, sx, kill, ready, msc, adel, ades, dmr;
  logic [31:0] addr, wdata, rdata, din, dout;
  logic [29:0] daddr;
  logic [3:0] dwe;
  int checks = 0, failures = 0;

  mem_controller dut (.mem_read(rd), .mem_write(wr), .mem_byte(bt), .mem_half(hf), .mem_sign_extend(sx),
    .mem_left(lft), .mem_right(rgt), .reverse(rev),
    .kill, .address(addr), .write_data(wdata), .read_data(rdata), .m_stall_controller(msc),
    .exc_adel(adel), .exc_ades(ades), .DataMem_In(din), .DataMem_Ready(ready),
    .DataMem_Address(daddr), .DataMem_Out(dout), .DataMem_Read(dmr), .DataMem_Write(dwe));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  function automatic logic [7:0] byt(logic [31:0] w, int j); return w[31 - 8 * j -: 8]; endfunction

  // reference for the unaligned group; k is the byte offset, byte 0 the MSB
  // (in reverse mode the model runs on the mirrored offset a ^ 3)
  task automatic check_lr(int a, logic [31:0] mem, logic [31:0] rt);
    logic [31:0] exp;
    logic [3:0]  we;
    int k;
    k = rev ? (a ^ 3) : a;
    addr = 32'h300 + a; din = mem; wdata = rt;
    // LWL: bytes k..3 of memory into rt bytes 0..3-k
    {rd, wr, lft, rgt} = 4'b1010; #1;
    for (int j = 0; j < 4; j++) exp[31 - 8 * j -: 8] = (j <= 3 - k) ? byt(mem, j + k) : byt(rt, j);
    chk($sformatf("lwl @%0d", k), rdata, exp); chk("lwl no adel", adel, 0); chk("lwl read", dmr, 1);
    // LWR: bytes 0..k of memory into rt bytes 3-k..3
    {rd, wr, lft, rgt} = 4'b1001; #1;
    for (int j = 0; j < 4; j++) exp[31 - 8 * j -: 8] = (j >= 3 - k) ? byt(mem, j - (3 - k)) : byt(rt, j);
    chk($sformatf("lwr @%0d", k), rdata, exp);
    // SWL: rt bytes 0..3-k into memory bytes k..3
    {rd, wr, lft, rgt} = 4'b0110; #1;
    for (int i = 0; i < 4; i++) we[3 - i] = (i >= k);
    chk($sformatf("swl we @%0d", k), dwe, we); chk("swl no ades", ades, 0);
    for (int i = k; i < 4; i++) chk("swl lane", dout[31 - 8 * i -: 8], byt(rt, i - k));
    // SWR: rt bytes 3-k..3 into memory bytes 0..k
    {rd, wr, lft, rgt} = 4'b0101; #1;
    for (int i = 0; i < 4; i++) we[3 - i] = (i <= k);
    chk($sformatf("swr we @%0d", k), dwe, we);
    for (int i = 0; i <= k; i++) chk("swr lane", dout[31 - 8 * i -: 8], byt(rt, i + 3 - k));
    {rd, wr, lft, rgt} = 4'b0000;
  endtask

  initial begin
    din = 32'h8192_A3F4; ready = 1; kill = 0; wdata = 32'h1122_33C4;
    // stores
    {rd, wr, bt, hf, sx} = 5'b01000;
    for (int a = 0; a < 4; a++) begin
      addr = 32'h100 + a; #1;
      chk($sformatf("sw we @%0d", a), dwe, a == 0 ? 4'b1111 : 4'b0000);
      chk($sformatf("sw ades @%0d", a), ades, a != 0);
    end
    addr = 32'h100; #1; chk("sw addr", daddr, 30'h40); chk("sw data", dout, 32'h1122_33C4);
    bt = 1;
    for (int a = 0; a < 4; a++) begin
      addr = 32'h100 + a; #1;
      chk($sformatf("sb we @%0d", a), dwe, 4'b1000 >> a);
      chk("sb lane", dout[31 - 8 * a -: 8], 32'hC4);
      chk("sb ades", ades, 0);
    end
    bt = 0; hf = 1;
    for (int a = 0; a < 4; a++) begin
      addr = 32'h100 + a; #1;
      chk($sformatf("sh we @%0d", a), dwe, a == 0 ? 4'b1100 : a == 2 ? 4'b0011 : 4'b0000);
      chk("sh ades", ades, a[0]);
    end
    addr = 32'h102; #1; chk("sh lane", dout[15:0], 32'h33C4);
    // loads
    {rd, wr, bt, hf, sx} = 5'b10101;
    addr = 32'h200; #1; chk("lb 0", rdata, 32'hFFFF_FF81); chk("lb read", dmr, 1);
    addr = 32'h201; #1; chk("lb 1", rdata, 32'hFFFF_FF92);
    addr = 32'h202; #1; chk("lb 2", rdata, 32'hFFFF_FFA3);
    addr = 32'h203; #1; chk("lb 3", rdata, 32'hFFFF_FFF4);
    sx = 0; addr = 32'h203; #1; chk("lbu 3", rdata, 32'h0000_00F4);
    {bt, hf, sx} = 3'b011;
    addr = 32'h200; #1; chk("lh 0", rdata, 32'hFFFF_8192);
    addr = 32'h202; #1; chk("lh 2", rdata, 32'hFFFF_A3F4);
    sx = 0; #1; chk("lhu 2", rdata, 32'h0000_A3F4);
    addr = 32'h201; #1; chk("lh adel", adel, 1); chk("lh no read", dmr, 0);
    {bt, hf, sx} = 3'b000; addr = 32'h204; #1; chk("lw", rdata, 32'h8192_A3F4); chk("lw adel", adel, 0);
    addr = 32'h206; #1; chk("lw adel", adel, 1); chk("lw no read", dmr, 0);
    // stall while the memory waits
    addr = 32'h204; ready = 0; #1; chk("stall", msc, 1);
    ready = 1; #1; chk("no stall", msc, 0);
    kill = 1; ready = 0; #1; chk("kill read", dmr, 0); chk("kill stall", msc, 0);
    {rd, wr} = 2'b01; #1; chk("kill write", dwe, 0);
    kill = 0; {rd, wr} = 2'b00; ready = 0; #1; chk("idle no stall", msc, 0);
    // unaligned left/right group
    ready = 1; {bt, hf, sx} = 3'b000;
    for (int n = 0; n < 500; n++) check_lr(n % 4, $urandom, $urandom);
    // reverse endian: sub-word lanes mirrored, words unchanged
    rev = 1; din = 32'h8192_A3F4;
    {rd, wr, bt, hf, sx} = 5'b10100;
    for (int a = 0; a < 4; a++) begin
      addr = 32'h400 + a; #1; chk($sformatf("rev lbu @%0d", a), rdata, 32'(byt(din, 3 - a)));
    end
    {bt, hf} = 2'b01;
    addr = 32'h400; #1; chk("rev lhu 0", rdata, 32'h0000_A3F4);
    addr = 32'h402; #1; chk("rev lhu 2", rdata, 32'h0000_8192);
    addr = 32'h401; #1; chk("rev lh adel", adel, 1);
    {rd, wr, bt, hf} = 4'b0101;
    addr = 32'h400; #1; chk("rev sh we 0", dwe, 4'b0011);
    {bt, hf} = 2'b10;
    addr = 32'h401; #1; chk("rev sb we 1", dwe, 4'b0010);
    {bt, hf} = 2'b00; #1; chk("rev sw ades", ades, 1);
    addr = 32'h404; #1; chk("rev sw we", dwe, 4'b1111); chk("rev sw data", dout, wdata);
    {rd, wr} = 2'b10; #1; chk("rev lw", rdata, din);
    {rd, wr} = 2'b00;
    for (int n = 0; n < 500; n++) check_lr(n % 4, $urandom, $urandom);
    rev = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
