07
ff
ff
ff
ff
ff
ff
07
ff
ff
00
ff
ff
ff
07
ff
ff
ff
ff
ff
ff
07
ff
ff
ff
ff
ff
ff
07
ff
