// remcs_pkg - constants and types shared by the REMCS card-to-card link.
//
// The ring carries 8b/10b coded symbols, one per clock of the symbol clock.
// A message frame is
//     SOF (K27.7) | header | length | payload words (low byte first) | EOF (K29.7)
// and the line is filled with K28.5 between frames. The header byte holds the
// exchange phase and the source and destination card. Payload words are 16
// bits wide, the word size of the CPU bus; the word indices of Tables I-III of
// the protocol (slave status, MCU01 packet, master control message) are the
// indices used here. The frame layout, the card numbering and the mailbox map
// are this design's own choices; the message contents follow the protocol.
//
// Mailbox word address (12 bits): {rx, phase[1:0], peer[2:0], index[5:0]}.
//   rx = 0: message the card sends, peer = destination card;
//   rx = 1: message the card received, peer = source card.
package remcs_pkg;

  // ------------------------------------------------------------------ cards
  localparam int unsigned N_CARDS   = 5;
  localparam logic [2:0]  ID_MASTER = 3'd0;  // DIF01 master
  localparam logic [2:0]  ID_U      = 3'd1;  // DIF01 slave, phase U
  localparam logic [2:0]  ID_V      = 3'd2;  // DIF01 slave, phase V
  localparam logic [2:0]  ID_W      = 3'd3;  // DIF01 slave, phase W
  localparam logic [2:0]  ID_MCU    = 3'd4;  // MCU01 slave

  typedef enum logic [1:0] {ROLE_MASTER, ROLE_DIF, ROLE_MCU} role_e;

  function automatic role_e role_of(input logic [2:0] id);
    if (id == ID_MASTER) return ROLE_MASTER;
    if (id == ID_MCU)    return ROLE_MCU;
    return ROLE_DIF;
  endfunction

  // ------------------------------------------------------------ exchange phases
  // PH_EXCH1: start of the period, master user data out, slave status back (step 9)
  // PH_EXCH2: end of the period, duty cycles out, slave user data back (step 10)
  // PH_MCU  : end of the period, copy of the slave data to MCU01 (step 11)
  localparam logic [1:0] PH_EXCH1 = 2'd1;
  localparam logic [1:0] PH_EXCH2 = 2'd2;
  localparam logic [1:0] PH_MCU   = 2'd3;

  // ------------------------------------------------------------------- timing
  localparam int unsigned CLK_HZ_DEF    = 130_000_000; // 1.04 Gbit/s effective / 8 bit
  localparam int unsigned SAMPLE_HZ_DEF = 18_000;      // 55.6 us sampling period
  localparam int unsigned ADC_CONV_NS   = 3_400;       // ADC conversion time

  // ------------------------------------------------------------ control chars
  localparam logic [7:0] K_IDLE = 8'hBC;  // K28.5, comma, fills the line
  localparam logic [7:0] K_SOF  = 8'hFB;  // K27.7
  localparam logic [7:0] K_EOF  = 8'hFD;  // K29.7
  localparam logic [7:0] K_ERR  = 8'hFE;  // K30.7, replaces a broken symbol

  // Decoded or to-be-encoded symbol.
  typedef struct packed {
    logic       valid;   // a frame symbol (idle is not valid)
    logic       k;       // control character
    logic [7:0] d;
  } sym_t;

  typedef struct packed {
    logic [1:0] ph;
    logic [2:0] src;
    logic [2:0] dst;
  } hdr_t;

  // -------------------------------------------------------- message lengths
  localparam int unsigned LEN_USER = 4;   // 64-bit user data
  localparam int unsigned LEN_T1   = 26;  // Table I,  DIF01 slave -> master
  localparam int unsigned LEN_T2   = 57;  // Table II, master -> MCU01
  localparam int unsigned LEN_T3   = 13;  // Table III, master -> DIF01 slave

  function automatic int unsigned frame_syms(input int unsigned words);
    return 4 + 2 * words;
  endfunction

  // Table I word indices (slave status message)
  localparam int unsigned T1_PWM_BLOCK = 13;
  localparam int unsigned T1_PWM_ERR   = 15;
  localparam int unsigned T1_ADC       = 17;
  localparam int unsigned T1_PWM_STAT  = 25;
  // Table III word indices (master control message)
  localparam int unsigned T3_IO   = 4;
  localparam int unsigned T3_LED  = 6;
  localparam int unsigned T3_DUTY = 7;
  localparam int unsigned N_PWM   = 6;
  localparam int unsigned N_ADC   = 16;  // MCU01 has 16 channels, DIF01 cards use 8
  localparam int unsigned N_FAULT = 6;

  // -------------------------------------------------------------- mailbox
  localparam int unsigned MB_AW = 12;
  typedef logic [MB_AW-1:0] mb_addr_t;

  function automatic mb_addr_t mb_addr(input logic rx, input logic [1:0] ph,
                                       input logic [2:0] peer, input logic [5:0] idx);
    return {rx, ph, peer, idx};
  endfunction

  // Frame content modes of the transmitter
  typedef enum logic [1:0] {
    TXM_PLAIN,   // all words from the mailbox
    TXM_T1,      // Table I: hardware fields replace words 13, 15, 17-25
    TXM_T2       // Table II: words gathered from the master's mailbox and ADC
  } txmode_e;

  // Source of word j of the Table II packet, in the master's mailbox, or
  // from its own ADC register (adc = 1, channel in idx[2:0]).
  typedef struct packed {
    logic     adc;
    mb_addr_t addr;
  } t2_src_t;

  function automatic t2_src_t t2_src(input logic [5:0] j);
    t2_src_t s;
    logic [2:0] card;
    logic [5:0] o;
    s = '0;
    if (j < 6'd4) begin                       // master user data
      s.addr = mb_addr(1'b0, PH_MCU, ID_MCU, j);
    end else if (j < 6'd37) begin             // per DIF01 card: 8 ADC, status, 2 duty
      card = 3'(6'd1 + (j - 6'd4) / 6'd11);
      o    = (j - 6'd4) % 6'd11;
      if (o < 6'd8)       s.addr = mb_addr(1'b1, PH_EXCH1, card, 6'(T1_ADC) + o);
      else if (o == 6'd8) s.addr = mb_addr(1'b1, PH_EXCH1, card, 6'(T1_PWM_STAT));
      else                s.addr = mb_addr(1'b0, PH_EXCH2, card, 6'(T3_DUTY) + o - 6'd9);
    end else if (j < 6'd45) begin             // master's own ADC channels
      s.adc  = 1'b1;
      s.addr = MB_AW'(j - 6'd37);
    end else begin                            // user data sent to U, V, W
      card   = 3'(6'd1 + (j - 6'd45) / 6'd4);
      s.addr = mb_addr(1'b0, PH_EXCH1, card, (j - 6'd45) % 6'd4);
    end
    return s;
  endfunction

  // ------------------------------------------------------- CPU register map
  // Word addresses with bit 12 set; below that the mailbox.
  localparam int unsigned CPU_AW     = 13;
  localparam logic [7:0] REG_CMD     = 8'h00; // W: [0] start exch1 [1] start exch2
                                              //    [2] clear error  [3] ack irq
  localparam logic [7:0] REG_STATUS  = 8'h01; // R: [0] busy [1] global error line
                                              //    [2] local error [3] irq [12:8] rx ok
  localparam logic [7:0] REG_RXERR   = 8'h02; // R: broken frames received
  localparam logic [7:0] REG_COLL    = 8'h03; // R: forwarded symbols lost
  localparam logic [7:0] REG_CAUSE   = 8'h04; // R: latched error causes
  localparam logic [7:0] REG_PWMSTAT = 8'h05; // R: PWM output levels
  localparam logic [7:0] REG_IO_LO   = 8'h06; // R: I/O word from the master, low
  localparam logic [7:0] REG_IO_HI   = 8'h07; // R: I/O word from the master, high
  localparam logic [7:0] REG_LED     = 8'h08; // R: LED byte from the master
  localparam logic [7:0] REG_ADC0    = 8'h10; // R: 0x10-0x1F captured ADC samples

endpackage
