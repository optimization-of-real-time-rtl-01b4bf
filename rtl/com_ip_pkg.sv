// Types and constants shared by the blocks of the communication IP.
//
// The communication IP moves the data that a static schedule sends between
// a processor and the FPGA. Each transferred data item is described by one
// ROM word: the number of packets it is made of (n bits), a direction bit
// (bit n, 0 = receive from the processor, 1 = send to it) and a
// synchronisation bit (bit n+1) that tells the OPRd synchronisation unit to
// raise a request or an acknowledgement towards the operators once the item
// has been transferred. That word layout follows the published description;
// the choice n = 7 (enough for the 64 packets of a 16x16 block carried
// four pixels per packet) is this design's own.
package com_ip_pkg;

  // n: width of the packet-count field of a ROM word.
  localparam int unsigned NPKT_W = 7;

  // Direction bit values.
  localparam logic DIR_RECEIVE = 1'b0;  // processor -> FPGA
  localparam logic DIR_SEND    = 1'b1;  // FPGA -> processor

  // One schedule ROM word, bit n+1 down to bit 0.
  typedef struct packed {
    logic              synchro;  // bit n+1: synchronise the OPRds after this item
    logic              in_out;   // bit n  : DIR_RECEIVE or DIR_SEND
    logic [NPKT_W-1:0] npkts;    // bits n-1..0: packets in this item (>= 1)
  } rom_word_t;

  // States of the control FSM. Output values per state are in com_fsm.
  typedef enum logic [2:0] {
    S_IDLE,
    S_RECEIVE1,
    S_RECEIVE2,
    S_RESET,
    S_SEND1,
    S_SEND2
  } com_state_t;

endpackage
