// tmc_csr: control and status registers behind the chip's 8-bit CSR port.
//
// Eight 8-bit registers are addressed by RA0-2. A write happens at every
// rising clock edge at which CS* and WR* are both low; while CS* is low and
// WR* high the addressed register is driven on CIO0-7 (cio_oe high).
//   CSR0 offset    rw  trigger latency in clocks, subtracted from the write
//                      pointer to give the event position (reset 16)
//   CSR1 rptr      r   read pointer
//   CSR2 status    r   {2'b0, orun, rrun, wrun, trigger FIFO count[2:0]}
//   CSR3 wptr      r   write pointer
//   CSR4 wcount    rw  memory words read out per event and channel (reset 8)
//   CSR5 evno      r   event number, low 8 bits
//   CSR6 errmask   rw  error enable mask (reset all ones)
//   CSR7 errflag   r   sticky error flags, write 1 to clear
// ERR* is low while an enabled error flag is set.
//
// The register numbers of the offset register (CSR0), read pointer (CSR1),
// write pointer (CSR3), word count (CSR4), event number counter (CSR5) and the
// test and miscellaneous registers (CSR6, 7) follow the chip's block diagram;
// the bus timing, the use of CSR2, the bit layouts and reset values are this
// design's choices.
module tmc_csr
  import tmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // CSR port
  input  logic              cs_n,
  input  logic              wr_n,
  input  logic [CSR_AW-1:0] ra,
  input  logic [CSR_W-1:0]  cio_in,
  output logic [CSR_W-1:0]  cio_out,
  output logic              cio_oe,
  // register values
  output logic [CSR_W-1:0]  offset,
  output logic [CSR_W-1:0]  wcount,
  // status
  input  logic [CSR_W-1:0]  rptr,
  input  logic [CSR_W-1:0]  wptr,
  input  logic [EVNO_W-1:0] evno,
  input  logic              wrun,
  input  logic              rrun,
  input  logic              orun,
  input  logic [2:0]        tcount,
  // errors
  input  logic [NERR-1:0]   err_set,
  output logic              err_n
);

  logic [CSR_W-1:0] errmask;
  logic [NERR-1:0]  errflag;
  logic             wr;

  assign wr = !cs_n && !wr_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset  <= 8'd16;
      wcount  <= 8'd8;
      errmask <= '1;
      errflag <= '0;
    end else begin
      if (wr && ra == CSR_OFFSET)  offset  <= cio_in;
      if (wr && ra == CSR_WCOUNT)  wcount  <= cio_in;
      if (wr && ra == CSR_ERRMASK) errmask <= cio_in;
      if (wr && ra == CSR_ERRFLAG) errflag <= (errflag & ~cio_in[NERR-1:0]) | err_set;
      else                         errflag <= errflag | err_set;
    end
  end

  always_comb begin
    cio_oe = !cs_n && wr_n;
    unique case (csr_addr_e'(ra))
      CSR_OFFSET:  cio_out = offset;
      CSR_RPTR:    cio_out = rptr;
      CSR_STATUS:  cio_out = {2'b00, orun, rrun, wrun, tcount};
      CSR_WPTR:    cio_out = wptr;
      CSR_WCOUNT:  cio_out = wcount;
      CSR_EVNO:    cio_out = evno[CSR_W-1:0];
      CSR_ERRMASK: cio_out = errmask;
      CSR_ERRFLAG: cio_out = {{(CSR_W-NERR){1'b0}}, errflag};
      default:     cio_out = '0;
    endcase
  end

  assign err_n = ~|(errflag & errmask[NERR-1:0]);

endmodule
