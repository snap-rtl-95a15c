// snap_boot_rom: SNAP's boot code, a small read-only overlay on the lowest
// addresses of memory bank 0.
//
// On reset the processor starts at address 0, where a DONE instruction waits
// for the first token of the executable queue. The first message to arrive
// (the startup message, which carries the program) makes the incoming buffer
// insert a message token; the handler table's message row points at the
// loader at address 2 after reset. The loader copies the message into
// memory at LOAD_ADDR and jumps there. The program's initialisation code then
// sets its own handler addresses (SETH) and ends with DONE.
//
// Startup-message format (this design's choice): word 0 = number N of words
// that follow, then the N program words.
//
//   0  DONE                 wait for the startup message
//   1  (word after DONE, fetched and dropped)
//   2  ADD  r1, r15, r0     r1 := N
//   3  ADDI r2, r0, LOAD_ADDR
//   5  ADD  r3, r2, r0      r3 := store pointer
//   6  BR   EQZ r1, +9      empty program: go straight to 16
//   8  ST   r15, [r3+0]     copy one message word
//  10  ADDI r3, r3, 1
//  12  ADDI r1, r1, -1
//  14  BR   NEZ r1, -7      back to 8
//  16  JR   r2              run the program
//  17  (word after JR, fetched and dropped)
//
// Combinational: `word` is the content of address `addr`; addresses beyond
// the loader read as 0 (ADD r0, r0, r0, a no-operation).
module snap_boot_rom
  import snap_pkg::*;
#(
  parameter int unsigned AW        = 5,          // 2**AW words of overlay
  parameter word_t       LOAD_ADDR = 16'd32
) (
  input  logic [AW-1:0] addr,
  output word_t         word
);
  function automatic word_t enc(opcode_e op, logic [3:0] d, logic [3:0] a, logic [3:0] b);
    return {op, d, a, b};
  endfunction

  always_comb begin
    unique case (32'(addr))
      0:  word = enc(OP_EVT, 4'd0, 4'd0, EV_DONE);
      2:  word = enc(OP_ADD, 4'd1, RMSG, 4'd0);
      3:  word = enc(OP_ADDI, 4'd2, 4'd0, 4'd0);
      4:  word = LOAD_ADDR;
      5:  word = enc(OP_ADD, 4'd3, 4'd2, 4'd0);
      6:  word = enc(OP_BR, 4'd1, BC_EQZ, 4'd0);
      7:  word = 16'd9;
      8:  word = enc(OP_ST, RMSG, 4'd3, 4'd0);
      9:  word = 16'd0;
      10: word = enc(OP_ADDI, 4'd3, 4'd3, 4'd0);
      11: word = 16'd1;
      12: word = enc(OP_ADDI, 4'd1, 4'd1, 4'd0);
      13: word = 16'hFFFF;
      14: word = enc(OP_BR, 4'd1, BC_NEZ, 4'd0);
      15: word = 16'hFFF9;
      16: word = enc(OP_JMP, 4'd2, 4'd0, 4'd1);
      default: word = 16'd0;
    endcase
  end
endmodule
