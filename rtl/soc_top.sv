// soc_top: the system on chip around the multi-context processor.
//
// Connects the processor (with its nHSE scheduler) to a dual-port on-chip
// memory that holds both program and data, to the LED output register and
// the switch input port, and brings a generic I/O bus out to the pins for
// the devices that live outside this RTL (the UART boot loader and the LCD
// controller). Data accesses are steered by word-address bits [29:26] (byte
// address bits [31:28]):
//   4'b1100  LED register          (0xC000_0000)
//   4'b1101  switches              (0xD000_0000)
//   4'b1110  external I/O bus      (0xE000_0000), acknowledged by io_ack
//   other    on-chip memory        (word address [17:0])
// Memory answers in the same clock, LED and switches one clock later, the
// external bus whenever io_ack rises; the processor waits for the answer.
// The clock input is the processor clock (33 MHz on the original board,
// produced there by a vendor clock generator that is not part of this RTL);
// reset_n is active low and synchronous. LED[13:0] are the LED register,
// LED[14] shows that some thread is running.
// From the published design: the set of blocks, the memory size and the LED address
// (bits [29:26] = 4'b1100). This design's own: the switch and external bus
// addresses and the meaning of LED[14].
module soc_top #(
  parameter int NTHREADS  = 4,
  parameter int NR_INT    = 4,
  parameter int MEM_DEPTH = 151552,
  localparam int TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic              clock,
  input  logic              reset_n,
  input  logic [7:0]        Switch,
  output logic [14:0]       LED,
  input  logic [NR_INT-1:0] ExtIntEv,
  input  logic [4:0]        MIPS32_Interrupts,
  input  logic              MIPS32_NMI,
  // external I/O bus (UART boot loader, LCD)
  output logic [25:0]       io_address,
  output logic [31:0]       io_wdata,
  output logic              io_re,
  output logic [3:0]        io_we,
  input  logic [31:0]       io_rdata,
  input  logic              io_ack,
  // status
  output logic [7:0]        MIPS32_IP,
  output logic [TW-1:0]     nHSE_Task_Select,
  output logic              nHSE_EN_sCPUi
);
  logic reset;
  assign reset = !reset_n;

  logic [31:0] dm_in, dm_out, im_in;
  logic [29:0] dm_addr, im_addr;
  logic        dm_ready, dm_read, im_ready, im_read;
  logic [3:0]  dm_we;

  processor #(.NTHREADS(NTHREADS), .NR_INT(NR_INT)) u_cpu (
    .clock, .reset, .Interrupts(MIPS32_Interrupts), .NMI(MIPS32_NMI), .ExtIntEv,
    .DataMem_In(dm_in), .DataMem_Ready(dm_ready), .DataMem_Out(dm_out),
    .DataMem_Address(dm_addr), .DataMem_Read(dm_read), .DataMem_Write(dm_we),
    .InstMem_In(im_in), .InstMem_Ready(im_ready), .InstMem_Address(im_addr),
    .InstMem_Read(im_read), .IP(MIPS32_IP), .nHSE_Task_Select, .nHSE_EN_sCPUi);

  // address decode
  logic sel_led, sel_sw, sel_io, sel_mem;
  assign sel_led = (dm_addr[29:26] == 4'b1100);
  assign sel_sw  = (dm_addr[29:26] == 4'b1101);
  assign sel_io  = (dm_addr[29:26] == 4'b1110);
  assign sel_mem = !(sel_led || sel_sw || sel_io);

  logic [31:0] mem_dout;
  logic        mem_ready, unused_ready;
  bram_dp #(.DEPTH(MEM_DEPTH)) u_mem (
    .clock,
    .addra(im_addr[17:0]), .rea(im_read), .douta(im_in), .dreadya(unused_ready),
    .addrb(dm_addr[17:0]), .reb(dm_read && sel_mem), .web(sel_mem ? dm_we : 4'b0000),
    .dinb(dm_out), .doutb(mem_dout), .dreadyb(mem_ready));
  // the instruction port of the on-chip memory never waits
  assign im_ready = 1'b1;

  logic [13:0] led_dout, led_q;
  logic        led_ack;
  led_port #(.WIDTH(14)) u_led (
    .clock, .reset, .dataIn(dm_out[14:0]), .Read(dm_read && sel_led),
    .Write(sel_led && dm_we != 4'b0000), .DataOut(led_dout), .Ack(led_ack), .LED(led_q));
  assign LED = {nHSE_EN_sCPUi, led_q};

  logic [7:0] sw_dout;
  logic       sw_ack;
  switches_port u_sw (
    .clock, .reset, .Read(dm_read && sel_sw), .Write(sel_sw && dm_we != 4'b0000),
    .Switch_in(Switch), .Switch_out(sw_dout), .Ack(sw_ack));

  assign io_address = dm_addr[25:0];
  assign io_wdata   = dm_out;
  assign io_re      = dm_read && sel_io;
  assign io_we      = sel_io ? dm_we : 4'b0000;

  always_comb begin
    if (sel_led)     begin dm_in = {18'h0, led_dout}; dm_ready = led_ack; end
    else if (sel_sw) begin dm_in = {24'h0, sw_dout};  dm_ready = sw_ack;  end
    else if (sel_io) begin dm_in = io_rdata;          dm_ready = io_ack;  end
    else             begin dm_in = mem_dout;          dm_ready = mem_ready; end
  end
endmodule
