// sic_io_mult: non-buffered SIC I/O device that multiplies the last two data
// words it has received.
//
// The device listens on the shared I/O lines.  When the processor raises
// `csrdy` it copies the 12-bit command from the status bus into COMM and
// answers with `accept` for one clock.  If the device field COMM[11:9] holds
// this device's number DEV_ID it acts on the command:
//   COMM[8]=0, COMM[6]=0  receive a data word: raise `ready`, take the word
//                         from the I/O bus when `datavalid` rises, answer
//                         with `accept` until `datavalid` falls, then run
//                         the multiply command;
//   COMM[8]=0, COMM[6]=1  send: wait for `ready`, put DATA (COMM[7]=0) on the
//                         I/O bus or STAT (COMM[7]=1) on the status bus for
//                         one clock, then raise `datavalid` until `accept`;
//   COMM[8]=1             run the multiply command.
// The multiply command sets STAT to BUSY (1), forms DATA <- DATA * OLD_DATA
// (truncated to the word width) while OLD_DATA takes the previous DATA, holds
// BUSY for CMD_CYCLES clocks and returns STAT to DONE (0).  The device takes
// no new command while it is busy, so a processor that starts an I/O
// instruction meanwhile waits in its handshake.
// The command fields, handshake order, BUSY/DONE codes and the five-cycle
// command time follow the SIC I/O device description; every handshake output
// is a registered state decode, and outputs that are not driven are zero so
// that the lines can be wire-ORed with the processor's.  The unused interrupt
// line of the original device is left out.
module sic_io_mult #(
  parameter int unsigned WORD_W     = 18,
  parameter int unsigned STATUS_W   = 12,
  parameter logic [2:0]  DEV_ID     = 3'd1,
  parameter int unsigned CMD_CYCLES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [STATUS_W-1:0] csbus_i,
  output logic [STATUS_W-1:0] csbus_o,
  input  logic [WORD_W-1:0]   iobus_i,
  output logic [WORD_W-1:0]   iobus_o,
  input  logic                csrdy_i,
  input  logic                ready_i,
  output logic                ready_o,
  input  logic                datavalid_i,
  output logic                datavalid_o,
  input  logic                accept_i,
  output logic                accept_o,
  output logic                busy       // STAT != DONE, for observation
);

  typedef enum logic [2:0] {
    D_IDLE, D_ACK, D_RECV, D_RECV_ACK, D_SEND_WAIT, D_SEND_DRV, D_SEND_DV, D_CMD
  } dstate_e;

  dstate_e               st;
  logic [STATUS_W-1:0]   comm;
  logic [STATUS_W-1:0]   stat;
  logic [WORD_W-1:0]     data, old_data;
  logic [$clog2(CMD_CYCLES+1)-1:0] cnt;

  wire       for_me   = (comm[11:9] == DEV_ID);
  wire       cmd_only = comm[8];
  wire       is_stat  = comm[7];
  wire       dir_send = comm[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      comm     <= '0;
      stat     <= '0;
      data     <= '0;
      old_data <= '0;
      cnt      <= '0;
    end else begin
      unique case (st)
        D_IDLE:
          if (csrdy_i) begin
            comm <= csbus_i;
            st   <= D_ACK;
          end
        D_ACK:
          if (!for_me)       st <= D_IDLE;
          else if (cmd_only) st <= D_CMD;
          else if (dir_send) st <= D_SEND_WAIT;
          else               st <= D_RECV;
        D_RECV:
          if (datavalid_i) begin
            data <= iobus_i;
            st   <= D_RECV_ACK;
          end
        D_RECV_ACK:
          if (!datavalid_i) st <= D_CMD;
        D_SEND_WAIT:
          if (ready_i) st <= D_SEND_DRV;
        D_SEND_DRV:
          st <= D_SEND_DV;
        D_SEND_DV:
          if (accept_i) st <= D_IDLE;
        D_CMD:
          if (cnt == 0 && stat == '0) begin
            stat     <= STATUS_W'(1);
            data     <= WORD_W'(data * old_data);
            old_data <= data;
            cnt      <= ($bits(cnt))'(CMD_CYCLES - 1);
          end else if (cnt != 0) begin
            cnt <= cnt - 1'b1;
          end else begin
            stat <= '0;
            st   <= D_IDLE;
          end
        default: st <= D_IDLE;
      endcase
    end
  end

  wire driving = (st == D_SEND_DRV) || (st == D_SEND_DV);

  assign accept_o    = (st == D_ACK) || (st == D_RECV_ACK);
  assign ready_o     = (st == D_RECV) || (st == D_RECV_ACK);
  assign datavalid_o = (st == D_SEND_DV);
  assign iobus_o     = (driving && !is_stat) ? data : '0;
  assign csbus_o     = (driving &&  is_stat) ? stat : '0;
  assign busy        = (stat != '0);

endmodule
