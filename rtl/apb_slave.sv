// apb_slave: APB completer of the APB-to-SPI bridge.
//
// It turns each APB transfer into one register access towards the SPI
// controller: a write to index 0 pushes a command, a write to index 1 pushes
// write data, a read of index 2 pops read data (see apb_spi_pkg). Only
// PADDR[1:0] selects the register, as in the published state diagram; the
// upper address bits are left to the system's address decoder.
//
// State machine (names follow the published diagram):
//   IDLE         waits for the APB setup phase (PSEL high, PENABLE low).
//   SETUP        first cycle of the access phase; address, direction and
//                data are held in registers. PREADY is low here, so every
//                transfer has exactly one wait state when nothing blocks it.
//   WAIT_FOR_ACK more wait states while the target cannot take the access:
//                command FIFO full, write-data FIFO full, or (for a read)
//                read-data FIFO still empty because the SPI read has not
//                finished yet.
//   CMD_FIFO / WDATA_FIFO / RDATA_FIFO
//                PREADY high for one cycle together with reg_write or
//                reg_read, so the FIFO moves at the same clock edge at which
//                the APB transfer completes. PRDATA carries reg_rdata in
//                RDATA_FIFO and is zero otherwise.
//   DONE         completes, with PREADY, an access that moves nothing
//                (a write to index 2 or 3, a read of index 0, 1 or 3).
//
// Timing: with nothing blocking, a transfer takes three PCLK cycles
// (setup, wait, access with PREADY). PSLVERR is always low: every access
// completes. Reset (PRESETn) is synchronous and active low.
// The one-wait-state rule, the register map and PSLVERR tied low follow the
// published description; merging the completion into the FIFO states and
// the DONE state for unmapped accesses are this design's choices.
module apb_slave
  import apb_spi_pkg::*;
(
  input  logic              pclk,
  input  logic              presetn,
  // APB
  input  logic [31:0]       paddr,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [DATA_W-1:0] pwdata,
  output logic              pready,
  output logic              pslverr,
  output logic [DATA_W-1:0] prdata,
  // register port towards the SPI controller
  output logic [1:0]        reg_addr,
  output logic [DATA_W-1:0] reg_wdata,
  output logic              reg_write,
  output logic              reg_read,
  input  logic [DATA_W-1:0] reg_rdata,
  input  logic              cmd_fifo_full,
  input  logic              wdata_fifo_full,
  input  logic              rdata_fifo_empty
);

  typedef enum logic [2:0] {
    IDLE, SETUP, WAIT_FOR_ACK, CMD_FIFO, WDATA_FIFO, RDATA_FIFO, DONE
  } state_e;

  state_e state, next_state;
  logic   write_q;

  // Where the held access goes once its target can take it.
  state_e target;
  logic   ack;
  always_comb begin
    target = DONE;
    ack    = 1'b1;
    if (write_q) begin
      unique case (reg_addr)
        REG_CMD:   begin target = CMD_FIFO;   ack = !cmd_fifo_full;   end
        REG_WDATA: begin target = WDATA_FIFO; ack = !wdata_fifo_full; end
        default:   ;
      endcase
    end else if (reg_addr == REG_RDATA) begin
      target = RDATA_FIFO;
      ack    = !rdata_fifo_empty;
    end
  end

  always_comb begin
    next_state = state;
    unique case (state)
      IDLE:         if (psel && !penable) next_state = SETUP;
      SETUP,
      WAIT_FOR_ACK: next_state = ack ? target : WAIT_FOR_ACK;
      default:      next_state = IDLE;   // CMD_FIFO, WDATA_FIFO, RDATA_FIFO, DONE
    endcase
  end

  always_ff @(posedge pclk) begin
    if (!presetn) begin
      state     <= IDLE;
      reg_addr  <= '0;
      reg_wdata <= '0;
      write_q   <= 1'b0;
    end else begin
      state <= next_state;
      if (state == IDLE && psel && !penable) begin
        reg_addr  <= paddr[1:0];
        reg_wdata <= pwdata;
        write_q   <= pwrite;
      end
    end
  end

  assign reg_write = (state == CMD_FIFO) || (state == WDATA_FIFO);
  assign reg_read  = (state == RDATA_FIFO);
  assign pready    = (state == CMD_FIFO) || (state == WDATA_FIFO) ||
                     (state == RDATA_FIFO) || (state == DONE);
  assign prdata    = (state == RDATA_FIFO) ? reg_rdata : '0;
  assign pslverr   = 1'b0;

  // APB rules the requester must keep: the access phase follows a setup
  // phase, and address, direction and data stay put until PREADY.
  a_enable_after_setup: assert property (@(posedge pclk) disable iff (!presetn)
      (psel && !penable) |=> (psel && penable))
    else $error("apb_slave: PENABLE did not follow the setup phase");
  a_stable_in_access: assert property (@(posedge pclk) disable iff (!presetn)
      (psel && penable && !pready) |=> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)))
    else $error("apb_slave: access signals changed during wait state");

endmodule
