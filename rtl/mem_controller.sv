// mem_controller: the memory-stage data memory controller.
//
// Turns a load or store of the instruction in MEM into a word access on the
// data memory interface and shapes the returned word. Byte and halfword
// accesses use byte enables (DataMem_Write[3:0]) on stores and lane selection
// with sign or zero extension on loads. The byte order is big-endian (byte
// address 0 is bits [31:24]), the MIPS default. A misaligned halfword or word
// address raises EXC_AdEL (load) or EXC_AdES (store) and no access is made.
// LWL/LWR/SWL/SWR (mem_left / mem_right) are never misaligned: for byte
// offset k, LWL puts the bytes from k to the end of the word into the top of
// rt and LWR the bytes from the start of the word to k into the bottom of rt,
// keeping the other bytes of rt (write_data carries rt's value); SWL and SWR
// store the same byte ranges from rt.
// 'reverse' (user mode with Status.RE) makes sub-word accesses little-endian
// by flipping the byte offset inside the word (bit 1 for halfwords); whole
// words are unchanged.
// While an access is outstanding and DataMem_Ready is low the controller
// asserts M_Stall_Controller, which freezes the pipeline up to MEM; the word is
// taken in the cycle DataMem_Ready is high. 'kill' suppresses the access
// (exception in this stage, or the pipeline not enabled).
// Timing: combinational; the memory answers in the same cycle or later.
// The handshake (Read, Write, Ready) and the signal names follow the
// published design; the byte order and the lane logic are this design's choices.
module mem_controller (
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic        mem_byte,
  input  logic        mem_half,
  input  logic        mem_sign_extend,
  input  logic        mem_left,
  input  logic        mem_right,
  input  logic        reverse,
  input  logic        kill,
  input  logic [31:0] address,
  input  logic [31:0] write_data,
  output logic [31:0] read_data,
  output logic        m_stall_controller,
  output logic        exc_adel,
  output logic        exc_ades,
  // data memory interface
  input  logic [31:0] DataMem_In,
  input  logic        DataMem_Ready,
  output logic [29:0] DataMem_Address,
  output logic [31:0] DataMem_Out,
  output logic        DataMem_Read,
  output logic [3:0]  DataMem_Write
);
  logic misaligned;
  logic [7:0]  rbyte;
  logic [15:0] rhalf;
  logic [1:0]  k;                // byte offset after the endian flip
  logic [4:0]  sh_l, sh_r;       // 8*k and 8*(3-k)
  logic [31:0] keep_l, keep_r;   // bytes of rt kept by LWL / LWR

  always_comb begin
    misaligned = mem_half ? address[0]
                 : (!mem_byte && !mem_left && !mem_right && address[1:0] != 2'b00);
    k      = address[1:0] ^ (mem_half ? {reverse, 1'b0} : {2{reverse}});
    sh_l   = {k, 3'b000};
    sh_r   = {~k, 3'b000};
    keep_l = ~(32'hFFFF_FFFF << sh_l);
    keep_r = ~(32'hFFFF_FFFF >> sh_r);
    exc_adel   = mem_read && misaligned;
    exc_ades   = mem_write && misaligned;

    DataMem_Address = address[31:2];
    DataMem_Read    = mem_read && !misaligned && !kill;
    DataMem_Write   = 4'b0000;
    DataMem_Out     = write_data;
    if (mem_write && !misaligned && !kill) begin
      if (mem_byte) begin
        DataMem_Out   = {4{write_data[7:0]}};
        DataMem_Write = 4'b1000 >> k;
      end else if (mem_half) begin
        DataMem_Out   = {2{write_data[15:0]}};
        DataMem_Write = k[1] ? 4'b0011 : 4'b1100;
      end else if (mem_left) begin
        DataMem_Out   = write_data >> sh_l;
        DataMem_Write = 4'b1111 >> k;
      end else if (mem_right) begin
        DataMem_Out   = write_data << sh_r;
        DataMem_Write = 4'b1111 << ~k;
      end else begin
        DataMem_Write = 4'b1111;
      end
    end

    unique case (k)
      2'b00: rbyte = DataMem_In[31:24];
      2'b01: rbyte = DataMem_In[23:16];
      2'b10: rbyte = DataMem_In[15:8];
      default: rbyte = DataMem_In[7:0];
    endcase
    rhalf = k[1] ? DataMem_In[15:0] : DataMem_In[31:16];
    if (mem_byte)      read_data = mem_sign_extend ? {{24{rbyte[7]}}, rbyte} : {24'h0, rbyte};
    else if (mem_half) read_data = mem_sign_extend ? {{16{rhalf[15]}}, rhalf} : {16'h0, rhalf};
    else if (mem_left)  read_data = (DataMem_In << sh_l) | (write_data & keep_l);
    else if (mem_right) read_data = (DataMem_In >> sh_r) | (write_data & keep_r);
    else               read_data = DataMem_In;

    m_stall_controller = (DataMem_Read || DataMem_Write != 4'b0000) && !DataMem_Ready;
  end
endmodule
